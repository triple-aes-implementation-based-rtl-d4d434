// aes_key_sched: AES-128 round key register with one-step key expansion.
//
// Holds one round key. load copies the cipher key in (round key 0). A step
// with fwd = 1 replaces round key i-1 by round key i; with fwd = 0 it replaces
// round key i by round key i-1. rnd gives i (1..10), which selects the round
// constant. An encryption core steps forward once per round; a decryption
// core first steps forward ten times to reach round key 10 and then steps
// backward once per round, so no table of eleven round keys is stored.
// load has priority over step. Timing: the new key is visible one clk after
// the edge that loads or steps it.
//
// The cores only name a round key input; how it is generated (on the fly,
// forward and backward) is this design's choice.
module aes_key_sched
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  state_t     key,
  input  logic       step,
  input  logic       fwd,
  input  logic [3:0] rnd,
  output state_t     rk
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rk <= '0;
    else if (load)
      rk <= key;
    else if (step)
      rk <= fwd ? key_next(rk, rnd) : key_prev(rk, rnd);
  end
endmodule
