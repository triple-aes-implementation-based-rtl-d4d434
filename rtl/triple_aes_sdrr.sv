// triple_aes_sdrr: Triple AES with secure double rate registers (top level).
//
// Holds a Triple AES encryption channel, C = E_K1(D_K2(E_K1(P))), and a
// Triple AES decryption channel, P = D_K1(E_K2(D_K1(C))), side by side. Every
// pipeline register inside the six AES-128 cores is an SDRR: clk is the
// double-rate clock, and the SDRR select, which is the reference clock of the
// unprotected design, is generated here by a flip-flop that toggles on every
// clk edge. On the edges where it is 0 the cores advance with real data; on the
// others every SDRR captures random data from rng, which is expected to carry
// a fresh random word each clk cycle (the generator is not part of the design).
//
// Each channel has a start/busy/done handshake: start while busy = 0 captures
// the input block and both keys; the result comes out with a one-clk done
// pulse, after 142 reference cycles (284 clk) for encryption and 152
// reference cycles (304 clk) for decryption, plus a few clk of hand-over
// between the stages. The channels are independent, so decrypting the
// encryption channel's output returns the plaintext. The two-channel
// arrangement and the handshake are this design's choices.
module triple_aes_sdrr
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  state_t rng,
  input  state_t key1,
  input  state_t key2,
  // encryption channel
  input  logic   enc_start,
  input  state_t enc_pt,
  output logic   enc_busy,
  output logic   enc_done,
  output state_t enc_ct,
  // decryption channel
  input  logic   dec_start,
  input  state_t dec_ct,
  output logic   dec_busy,
  output logic   dec_done,
  output state_t dec_pt
);
  logic sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= 1'b0;
    else        sel <= !sel;
  end

  triple_aes_enc u_enc (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(enc_start),
    .key1(key1), .key2(key2), .pt(enc_pt), .busy(enc_busy), .done(enc_done), .ct(enc_ct));

  triple_aes_dec u_dec (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(dec_start),
    .key1(key1), .key2(key2), .ct(dec_ct), .busy(dec_busy), .done(dec_done), .pt(dec_pt));

endmodule
