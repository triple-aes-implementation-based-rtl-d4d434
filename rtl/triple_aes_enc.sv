// triple_aes_enc: Triple AES encryption, C = E_K1(D_K2(E_K1(P))).
//
// Three AES-128 cores with SDRR-protected pipelines in series:
// E1 (encrypt, K1) -> D1 (decrypt, K2) -> E2 (encrypt, K1).
// Key K1 is used by the first and third stage and K2 by the middle one. The
// chain and the key assignment are those of the design; the sequencing is this
// design's choice: start (while busy = 0) captures the input block and both
// keys, each stage starts one clk after the previous one signals done, and a
// new block is accepted only when the whole chain is idle. The result appears
// on ct with a one-clk done pulse after 44 + 54 + 44 = 142 reference cycles plus at most
// a few clk cycles of hand-over, and is held until the next result.
// clk is the double-rate clock and sel the reference clock shared by the cores.
module triple_aes_enc
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sel,
  input  state_t rng,
  input  logic   start,
  input  state_t key1,
  input  state_t key2,
  input  state_t pt,
  output logic   busy,
  output logic   done,
  output state_t ct
);
  state_t k1_q, k2_q;
  state_t s1_out, s2_out;
  logic   s1_busy, s2_busy, s3_busy;
  logic   s1_done, s2_done;
  logic   accept;

  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k1_q <= '0;
      k2_q <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      k1_q <= key1;
      k2_q <= key2;
    end else if (done) begin
      busy <= 1'b0;
    end
  end

  aes_enc_sdrr u_s1 (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(accept), .key(key1),
    .pt(pt), .busy(s1_busy), .done(s1_done), .ct(s1_out));

  aes_dec_sdrr u_s2 (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(s1_done), .key(k2_q),
    .ct(s1_out), .busy(s2_busy), .done(s2_done), .pt(s2_out));

  aes_enc_sdrr u_s3 (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(s2_done), .key(k1_q),
    .pt(s2_out), .busy(s3_busy), .done(done), .ct(ct));

  // a stage is only started when it is idle
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !s1_busy);
  assert property (@(posedge clk) disable iff (!rst_n) s1_done |-> !s2_busy);
  assert property (@(posedge clk) disable iff (!rst_n) s2_done |-> !s3_busy);

endmodule
