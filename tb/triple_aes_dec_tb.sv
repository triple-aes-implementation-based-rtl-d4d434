// triple_aes_dec_tb: self-checking testbench for Triple AES decryption, P = D_K1(E_K2(D_K1(C))).
//
// Random blocks and key pairs are compared with the behavioural reference
// composed the same way. With K1 = K2 the triple operation collapses to a
// single AES-128 operation with K1, which is checked too. The latency must be
// 152 reference cycles, i.e. 304 to 307 clock cycles from the
// accepting edge to the edge that sees done (each of the three stages may add
// one clock of sel phase alignment).
module triple_aes_dec_tb;
  import aes_ref_pkg::*;
  localparam int T = 152;
  logic clk = 0, rst_n = 0, sel = 0, start = 0;
  logic [127:0] rng = 0, key1 = 0, key2 = 0, din = 0, dout;
  logic busy, done;
  int checks = 0, failures = 0, cyc = 0, equal_keys = 0;

  triple_aes_dec dut (.clk(clk), .rst_n(rst_n), .sel(sel), .rng(rng), .start(start),
    .key1(key1), .key2(key2), .ct(din), .busy(busy), .done(done), .pt(dout));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    sel <= rst_n ? !sel : 1'b0;
  end

  always @(negedge clk) rng = rand_blk();

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input logic [127:0] x, input logic [127:0] k1, input logic [127:0] k2,
                           input logic [127:0] exp);
    int t0, lat;
    @(negedge clk);
    while (busy) @(negedge clk);
    din = x; key1 = k1; key2 = k2; start = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0;
    // the keys and the block are captured at start
    din = rand_blk(); key1 = rand_blk(); key2 = rand_blk();
    repeat (20) @(negedge clk);
    start = 1;  // ignored while busy
    @(negedge clk); start = 0;
    do @(posedge clk); while (!done);
    lat = cyc - t0;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("result %h expected %h", dout, exp);
    end
    checks++;
    if (lat < 2*T || lat > 2*T + 3) begin
      failures++;
      $display("latency %0d clk, expected %0d..%0d", lat, 2*T, 2*T + 3);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      logic [127:0] x, k1, k2;
      x = rand_blk(); k1 = rand_blk(); k2 = rand_blk();
      if (n % 2) @(negedge clk);
      run_block(x, k1, k2, decrypt(encrypt(decrypt(x, k1), k2), k1));
    end
    // equal keys: same result as a single AES-128 operation
    for (int n = 0; n < 2; n++) begin
      logic [127:0] x, k1, k2;
      x = rand_blk(); k1 = rand_blk(); k2 = k1;
      run_block(x, k1, k2, decrypt(x, k1));
      equal_keys++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
