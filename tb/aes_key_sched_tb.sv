// aes_key_sched_tb: loads a cipher key, steps the round key register forward
// ten times and back ten times, and compares every round key with the
// reference key expansion (FIPS-197 appendix A.1 key plus random keys). Also
// checks that a step is taken only when step = 1 and that load wins over step.
module aes_key_sched_tb;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0, fwd = 1;
  logic [3:0] rnd = 0;
  logic [127:0] key = 0, rk;
  int checks = 0, failures = 0;

  aes_key_sched dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .step(step),
                     .fwd(fwd), .rnd(rnd), .rk(rk));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_key(input logic [127:0] k);
    @(negedge clk); key = k; load = 1; step = 1;
    @(negedge clk); load = 0; step = 0;
    check(rk, k, "load");
    @(negedge clk);
    check(rk, k, "hold without step");
    for (int i = 1; i <= 10; i++) begin
      fwd = 1; rnd = 4'(i); step = 1;
      @(negedge clk); step = 0;
      check(rk, round_key(k, i), $sformatf("forward to round key %0d", i));
    end
    for (int i = 10; i >= 1; i--) begin
      fwd = 0; rnd = 4'(i); step = 1;
      @(negedge clk); step = 0;
      check(rk, round_key(k, i - 1), $sformatf("backward to round key %0d", i - 1));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(round_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 10),
          128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference round key 10 (FIPS-197 A.1)");
    for (int n = 0; n < 20; n++) run_key(rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
