// triple_aes_dec: Triple AES decryption, P = D_K1(E_K2(D_K1(C))).
//
// Three AES-128 cores with SDRR-protected pipelines in series:
// D1 (decrypt, K1) -> E1 (encrypt, K2) -> D2 (decrypt, K1).
// Key K1 is used by the first and third stage and K2 by the middle one. The
// chain and the key assignment are those of the design; the sequencing is this
// design's choice: start (while busy = 0) captures the input block and both
// keys, each stage starts one clk after the previous one signals done, and a
// new block is accepted only when the whole chain is idle. The result appears
// on pt with a one-clk done pulse after 54 + 44 + 54 = 152 reference cycles plus at most
// a few clk cycles of hand-over, and is held until the next result.
// clk is the double-rate clock and sel the reference clock shared by the cores.
module triple_aes_dec
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sel,
  input  state_t rng,
  input  logic   start,
  input  state_t key1,
  input  state_t key2,
  input  state_t ct,
  output logic   busy,
  output logic   done,
  output state_t pt
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

  aes_dec_sdrr u_s1 (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(accept), .key(key1),
    .ct(ct), .busy(s1_busy), .done(s1_done), .pt(s1_out));

  aes_enc_sdrr u_s2 (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(s1_done), .key(k2_q),
    .pt(s1_out), .busy(s2_busy), .done(s2_done), .ct(s2_out));

  aes_dec_sdrr u_s3 (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(s2_done), .key(k1_q),
    .ct(s2_out), .busy(s3_busy), .done(done), .pt(pt));

  // a stage is only started when it is idle
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !s1_busy);
  assert property (@(posedge clk) disable iff (!rst_n) s1_done |-> !s2_busy);
  assert property (@(posedge clk) disable iff (!rst_n) s2_done |-> !s3_busy);

endmodule
