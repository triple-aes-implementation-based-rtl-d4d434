// aes_pkg: types, constants and functions shared by the AES-128 layers, the
// key schedule and the SDRR-protected cores.
//
// State layout follows FIPS-197: a 128-bit word holds bytes b0..b15 with b0 in
// bits [127:120]; byte 4*c+r is row r of column c. The S-box is not stored as
// a table: it is computed as logic from its definition,
// S(x) = A * x^-1 + 0x63 over GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1,
// where x^-1 is computed as x^254 by a fixed chain of multiplications (0 maps
// to 0), so no loop has to be unrolled. The inverse S-box is the inverse
// affine map followed by the same inversion. The key schedule steps move one
// round key at a time, forward (round i-1 to i) or backward (round i to i-1),
// so a core needs only one 128-bit key register.
package aes_pkg;

  typedef logic [127:0]      state_t;

  localparam int unsigned NR = 10;           // AES-128 rounds after round 0
  localparam int unsigned PHASES = 4;        // pipeline stages (cycles) per round
  localparam int unsigned ENC_CYCLES = (NR + 1) * PHASES;  // 44

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128;
    a2   = xtime(a);
    a4   = xtime(a2);
    a8   = xtime(a4);
    a16  = xtime(a8);
    a32  = xtime(a16);
    a64  = xtime(a32);
    a128 = xtime(a64);
    return ({8{b[0]}} & a)   ^ ({8{b[1]}} & a2)  ^ ({8{b[2]}} & a4)  ^ ({8{b[3]}} & a8)
         ^ ({8{b[4]}} & a16) ^ ({8{b[5]}} & a32) ^ ({8{b[6]}} & a64) ^ ({8{b[7]}} & a128);
  endfunction

  // x^254 = x^-1 in GF(2^8), by the addition chain
  // 2, 3, 6, 12, 15, 30, 60, 120, 240, 252, 254 (0 maps to 0)
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] x2, x3, x12, x15, x240;
    x2   = gf_mul(a, a);
    x3   = gf_mul(x2, a);
    x12  = gf_mul(gf_mul(x3, x3), gf_mul(x3, x3));
    x15  = gf_mul(x12, x3);
    x240 = gf_mul(x15, x15);      // x^30
    x240 = gf_mul(x240, x240);    // x^60
    x240 = gf_mul(x240, x240);    // x^120
    x240 = gf_mul(x240, x240);    // x^240
    return gf_mul(gf_mul(x240, x12), x2);
  endfunction

  function automatic logic [7:0] rotl(input logic [7:0] b, input int unsigned n);
    return 8'((b << n) | (b >> (8 - n)));
  endfunction

  // S-box affine map: b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63
  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl(b, 1) ^ rotl(b, 2) ^ rotl(b, 3) ^ rotl(b, 4) ^ 8'h63;
  endfunction

  // inverse affine map: rotl(x,1) ^ rotl(x,3) ^ rotl(x,6) with x = y ^ 0x63
  function automatic logic [7:0] inv_affine(input logic [7:0] y);
    logic [7:0] x;
    x = y ^ 8'h63;
    return rotl(x, 1) ^ rotl(x, 3) ^ rotl(x, 6);
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return affine(gf_inv(x));
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] y);
    return gf_inv(inv_affine(y));
  endfunction

  // round constant of round i (1..10)
  function automatic logic [7:0] rcon(input logic [3:0] i);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 1; k < 10; k++)
      if (k < int'(i)) r = xtime(r);
    return r;
  endfunction

  function automatic logic [31:0] sub_rot_word(input logic [31:0] w);
    // RotWord then SubWord: (a0,a1,a2,a3) -> S(a1),S(a2),S(a3),S(a0)
    return {sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0]), sbox(w[31:24])};
  endfunction

  // round key i from round key i-1
  function automatic state_t key_next(input state_t k, input logic [3:0] i);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ sub_rot_word(k[31:0]) ^ {rcon(i), 24'h0};
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0]  ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // round key i-1 from round key i
  function automatic state_t key_prev(input state_t k, input logic [3:0] i);
    logic [31:0] w0, w1, w2, w3;
    w3 = k[31:0]  ^ k[63:32];
    w2 = k[63:32] ^ k[95:64];
    w1 = k[95:64] ^ k[127:96];
    w0 = k[127:96] ^ sub_rot_word(w3) ^ {rcon(i), 24'h0};
    return {w0, w1, w2, w3};
  endfunction

endpackage
