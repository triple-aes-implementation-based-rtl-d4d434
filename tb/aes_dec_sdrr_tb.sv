// aes_dec_sdrr_tb: self-checking testbench for the SDRR-protected AES-128
// decryption core.
//
// sel toggles every clock as the reference clock and rng carries a fresh
// random word every cycle. Each block is checked against the FIPS-197 vectors
// or the behavioural reference, and its latency against 54 (10 key-expansion steps + 44) reference
// cycles: from the clock edge that accepts start to the first edge that sees
// done, 108 or 109 clock cycles depending on the phase of sel at
// acceptance. A start raised while the core is busy must be ignored. During
// every cycle with sel = 1 the first pipeline SDRR must present the random word
// it captured (random data interleaved with real data).
module aes_dec_sdrr_tb;
  import aes_ref_pkg::*;
  localparam int N = 54;
  logic clk = 0, rst_n = 0, sel = 0, start = 0;
  logic [127:0] rng = 0, key = 0, din = 0, dout;
  logic busy, done;
  logic [127:0] rng_hist [3];
  int checks = 0, failures = 0, cyc = 0, rand_cycles = 0, busy_starts = 0;

  aes_dec_sdrr dut (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(start), .key(key),
                   .ct(din), .busy(busy), .done(done), .pt(dout));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    sel <= rst_n ? !sel : 1'b0;
  end

  always @(negedge clk) rng = rand_blk();

  // random data interleave in the first pipeline register
  always @(posedge clk) begin
    if (rst_n && sel && cyc > 4) begin
      checks++;
      rand_cycles++;
      if (dut.u_reg_isr.data_out !== rng_hist[1]) begin
        failures++;
        $display("cycle %0d: SDRR output %h is not the random word %h", cyc, dut.u_reg_isr.data_out, rng_hist[1]);
      end
    end
    rng_hist[2] = rng_hist[1];
    rng_hist[1] = rng_hist[0];
    rng_hist[0] = rng;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
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

  task automatic run_block(input logic [127:0] x, input logic [127:0] k, input logic [127:0] exp,
                           input bit poke_busy);
    int t0, lat;
    @(negedge clk);
    while (busy) @(negedge clk);
    din = x; key = k; start = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0;
    if (poke_busy) begin
      repeat (7) @(negedge clk);
      din = ~x; key = ~k; start = 1; busy_starts++;
      @(negedge clk); start = 0;
    end
    // inputs may change once accepted
    din = rand_blk(); key = rand_blk();
    do @(posedge clk); while (!done);
    lat = cyc - t0;
    check(dout, exp, "block result");
    checks++;
    if (lat != 2*N && lat != 2*N + 1) begin
      failures++;
      $display("latency %0d clk, expected %0d or %0d", lat, 2*N, 2*N + 1);
    end
    #1;
    checks++;
    if (done || busy) begin failures++; $display("done/busy not cleared"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0);
    run_block(128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 1);
    for (int n = 0; n < 20; n++) begin
      logic [127:0] x, k;
      x = rand_blk(); k = rand_blk();
      // alternate the phase of sel at acceptance
      if (n % 2) @(negedge clk);
      run_block(x, k, decrypt(x, k), n % 3 == 0);
    end
    checks++;
    if (rand_cycles == 0 || busy_starts == 0) failures++;
    $display("random cycles seen=%0d starts while busy=%0d", rand_cycles, busy_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
