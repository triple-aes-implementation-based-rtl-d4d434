// aes_shift_rows: the AES ShiftRows layer, or InvShiftRows when INVERSE = 1.
//
// Row r of the 4x4 byte state is rotated left (right for the inverse) by r
// positions. With the FIPS-197 layout (byte 4*c+r = row r, column c, byte 0 in
// the top bits) output byte (r, c) takes input byte (r, c+r mod 4), or
// (r, c-r mod 4) for the inverse. Pure wiring, no gates.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t d,
  output state_t q
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int src_c;
        src_c = INVERSE ? (c - r + 4) % 4 : (c + r) % 4;
        q[127 - 8*(4*c + r) -: 8] = d[127 - 8*(4*src_c + r) -: 8];
      end
  end
endmodule
