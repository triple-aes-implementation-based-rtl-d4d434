// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for the
// multiplicative inverse in GF(2^8) and applying the affine map as
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63; the cipher and the
// inverse cipher follow FIPS-197 step by step on a 16-byte array with a full
// table of eleven round keys. Not synthesizable, testbench use only.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   bytes_t [16];

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] acc = 0;
    logic [7:0] aa = a;
    logic [7:0] bb = b;
    while (bb != 0) begin
      if (bb[0]) acc = acc ^ aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb = bb >> 1;
    end
    return acc;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  // forward table (inv = 0) or inverse table (inv = 1), built once below
  function automatic logic [255:0][7:0] make_table(input bit inv);
    logic [255:0][7:0] s, si;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] y = 0;
      for (int z = 1; z < 256; z++)
        if (mul(8'(x), 8'(z)) == 8'h01) y = 8'(z);
      s[x] = y ^ rotl8(y, 1) ^ rotl8(y, 2) ^ rotl8(y, 3) ^ rotl8(y, 4) ^ 8'h63;
    end
    for (int x = 0; x < 256; x++) si[s[x]] = 8'(x);
    return inv ? si : s;
  endfunction

  logic [255:0][7:0] s_tab  = make_table(0);
  logic [255:0][7:0] si_tab = make_table(1);

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return s_tab[x];
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] x);
    return si_tab[x];
  endfunction

  function automatic bytes_t to_bytes(input blk_t b);
    bytes_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic blk_t from_bytes(input bytes_t s);
    blk_t b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  // round key r (0..10) of the FIPS-197 key expansion
  function automatic blk_t round_key(input blk_t key, input int r);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]) ^ rc, sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic bytes_t shift_rows(input bytes_t s, input bit inv);
    bytes_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (inv) o[4*((c + r) % 4) + r] = s[4*c + r];
        else     o[4*c + r] = s[4*((c + r) % 4) + r];
    return o;
  endfunction

  function automatic bytes_t mix_columns(input bytes_t s, input bit inv);
    bytes_t o;
    logic [7:0] m [4] = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 0;
        for (int k = 0; k < 4; k++)
          o[4*c + r] ^= mul(m[(k - r + 4) % 4], s[4*c + k]);
      end
    return o;
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    bytes_t s = to_bytes(pt ^ round_key(key, 0));
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      s = shift_rows(s, 0);
      if (r != 10) s = mix_columns(s, 0);
      s = to_bytes(from_bytes(s) ^ round_key(key, r));
    end
    return from_bytes(s);
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key);
    bytes_t s = to_bytes(ct ^ round_key(key, 10));
    for (int r = 9; r >= 0; r--) begin
      s = shift_rows(s, 1);
      for (int i = 0; i < 16; i++) s[i] = inv_sbox(s[i]);
      s = to_bytes(from_bytes(s) ^ round_key(key, r));
      if (r != 0) s = mix_columns(s, 1);
    end
    return from_bytes(s);
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
