// sdrr_tb: self-checking testbench for the secure double rate register.
//
// Drives sel as a toggling reference clock, fresh random data and random
// words every cycle, and checks every cycle that the output equals the word
// the multiplexer selected two clock edges earlier (data when sel was 0,
// random when sel was 1). It also checks the interleave: the output carries
// real data exactly in the cycles with sel = 0.
module sdrr_tb;
  localparam int W = 128;
  logic clk = 0, rst_n = 0, sel = 0;
  logic [W-1:0] din, rnd, dout;
  logic [W-1:0] hist [2];
  logic         hist_real [2];
  int checks = 0, failures = 0, real_seen = 0, rand_seen = 0;

  sdrr #(.WIDTH(W)) dut (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(din), .rnd_in(rnd), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rw();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    din = rw(); rnd = rw();
    repeat (2) @(negedge clk);
    // reset value
    checks++; if (dout !== '0) begin failures++; $display("reset value wrong"); end
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      // model of the two edges
      hist[1] = hist[0]; hist_real[1] = hist_real[0];
      hist[0] = sel ? rnd : din; hist_real[0] = !sel;
      #1;
      sel = !sel;
      if (n >= 2) begin
        checks++;
        if (dout !== hist[1]) begin
          failures++;
          $display("cycle %0d: out %h expected %h", n, dout, hist[1]);
        end
        // real data visible during sel = 0 cycles only
        checks++;
        if (hist_real[1] != !sel) begin failures++; $display("interleave wrong at %0d", n); end
        if (hist_real[1]) real_seen++; else rand_seen++;
      end
      din = rw(); rnd = rw();
    end
    checks++;
    if (real_seen == 0 || rand_seen == 0) failures++;
    $display("real words out=%0d random words out=%0d", real_seen, rand_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
