// aes_sub_bytes: the AES SubBytes layer, or InvSubBytes when INVERSE = 1.
//
// Sixteen independent byte substitutions through the S-box (or its inverse),
// computed by the aes_pkg functions as GF(2^8) inversion plus affine map. Purely combinational; in the
// cores it is the first of the four round layers and is followed by a pipeline
// register. The layer itself is the standard AES one; the parameter that folds
// the forward and inverse layer into one module is this design's choice.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t d,
  output state_t q
);
  always_comb begin
    for (int b = 0; b < 16; b++)
      q[8*b +: 8] = INVERSE ? inv_sbox(d[8*b +: 8]) : sbox(d[8*b +: 8]);
  end
endmodule
