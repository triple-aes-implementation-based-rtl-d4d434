// aes_mix_columns: the AES MixColumns layer, or InvMixColumns when INVERSE = 1.
//
// Each 32-bit column is multiplied by the fixed matrix circ(02,03,01,01)
// (inverse: circ(0e,0b,0d,09)) over GF(2^8). Purely combinational.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t d,
  output state_t q
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a [4];
      for (int r = 0; r < 4; r++) a[r] = d[127 - 8*(4*c + r) -: 8];
      for (int r = 0; r < 4; r++) begin
        if (INVERSE)
          q[127 - 8*(4*c + r) -: 8] = gf_mul(a[r], 8'h0e) ^ gf_mul(a[(r+1)%4], 8'h0b)
                                    ^ gf_mul(a[(r+2)%4], 8'h0d) ^ gf_mul(a[(r+3)%4], 8'h09);
        else
          q[127 - 8*(4*c + r) -: 8] = xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4]
                                    ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    end
  end
endmodule
