// triple_aes_sdrr_tb: end-to-end testbench of the Triple AES with SDRR top
// level, at its default (and only) configuration.
//
// Blocks are encrypted on the encryption channel and each ciphertext is fed
// back into the decryption channel, which must return the plaintext; both
// results are compared with the behavioural reference. The test makes each
// mechanism of the design happen and counts it: triple encryption, triple
// decryption, the encrypt/decrypt round trip, both channels busy at the same
// time, a start ignored while a channel is busy, the random-data cycles of
// the SDRRs (checked in the first pipeline register of every core), and the
// equal-key case in which the triple operation reduces to one AES-128
// operation. A mechanism that never happened counts as a failure. Latencies
// are checked against 142 (encryption) and 152 (decryption) reference cycles.
module triple_aes_sdrr_tb;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [127:0] rng = 0, key1 = 0, key2 = 0;
  logic enc_start = 0, enc_busy, enc_done;
  logic dec_start = 0, dec_busy, dec_done;
  logic [127:0] enc_pt = 0, enc_ct, dec_ct = 0, dec_pt;
  int checks = 0, failures = 0, cyc = 0;
  int n_enc = 0, n_dec = 0, n_roundtrip = 0, n_overlap = 0, n_ignored = 0, n_random = 0, n_equal = 0;
  logic [127:0] rng_hist [2];

  triple_aes_sdrr dut (
    .clk(clk), .rst_n(rst_n), .rng(rng), .key1(key1), .key2(key2),
    .enc_start(enc_start), .enc_pt(enc_pt), .enc_busy(enc_busy), .enc_done(enc_done), .enc_ct(enc_ct),
    .dec_start(dec_start), .dec_ct(dec_ct), .dec_busy(dec_busy), .dec_done(dec_done), .dec_pt(dec_pt));

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) rng = rand_blk();

  // SDRR interleave: in every sel = 1 cycle the first pipeline register of
  // each core shows the random word captured two edges before
  always @(posedge clk) begin
    if (rst_n && dut.sel && cyc > 4) begin
      logic [127:0] r;
      r = rng_hist[1];
      checks++;
      n_random++;
      if (dut.u_enc.u_s1.u_reg_sb.data_out !== r || dut.u_enc.u_s2.u_reg_isr.data_out !== r
          || dut.u_enc.u_s3.u_reg_sb.data_out !== r || dut.u_dec.u_s1.u_reg_isr.data_out !== r
          || dut.u_dec.u_s2.u_reg_sb.data_out !== r || dut.u_dec.u_s3.u_reg_isr.data_out !== r) begin
        failures++;
        $display("cycle %0d: an SDRR did not present the random word", cyc);
      end
    end
    rng_hist[1] = rng_hist[0];
    rng_hist[0] = rng;
  end

  always @(posedge clk) if (enc_busy && dec_busy) n_overlap++;

  initial begin
    #2000000;
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

  task automatic check_lat(input int lat, input int t, input string what);
    checks++;
    if (lat < 2*t || lat > 2*t + 3) begin
      failures++;
      $display("%s latency %0d clk, expected %0d..%0d", what, lat, 2*t, 2*t + 3);
    end
  endtask

  // encrypt p on the encryption channel while the decryption channel works
  // on c (the previous ciphertext); both with the same keys
  task automatic step(input logic [127:0] p, input logic [127:0] k1, input logic [127:0] k2,
                      input bit dec_on, input logic [127:0] c, input logic [127:0] c_plain,
                      output logic [127:0] ct_out);
    int t0, t_enc, t_dec;
    bit got_enc, got_dec;
    @(negedge clk);
    key1 = k1; key2 = k2;
    enc_pt = p; enc_start = 1;
    dec_ct = c; dec_start = dec_on;
    @(posedge clk); t0 = cyc;
    @(negedge clk); enc_start = 0; dec_start = 0;
    enc_pt = rand_blk(); dec_ct = rand_blk(); key1 = rand_blk(); key2 = rand_blk();
    repeat (30) @(negedge clk);
    // starts while busy must be ignored
    enc_start = 1; dec_start = dec_on; n_ignored++;
    @(negedge clk); enc_start = 0; dec_start = 0;
    got_enc = 0; got_dec = !dec_on;
    while (!(got_enc && got_dec)) begin
      @(posedge clk);
      if (enc_done) begin got_enc = 1; t_enc = cyc; end
      if (dec_done) begin got_dec = 1; t_dec = cyc; end
    end
    #1;
    ct_out = enc_ct;
    check(enc_ct, encrypt(decrypt(encrypt(p, k1), k2), k1), "triple encryption");
    check_lat(t_enc - t0, 142, "encryption");
    n_enc++;
    if (k1 == k2) begin
      check(enc_ct, encrypt(p, k1), "equal keys = single AES");
      n_equal++;
    end
    if (dec_on) begin
      check(dec_pt, c_plain, "round trip");
      check(dec_pt, decrypt(encrypt(decrypt(c, k1), k2), k1), "triple decryption");
      check_lat(t_dec - t0, 152, "decryption");
      n_dec++;
      n_roundtrip++;
    end
  endtask

  initial begin
    logic [127:0] k1, k2, p, prev_p, prev_c, c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    k1 = rand_blk(); k2 = rand_blk();
    prev_c = 0; prev_p = 0;
    for (int n = 0; n < 6; n++) begin
      p = rand_blk();
      if (n == 5) k2 = k1;   // equal keys
      step(p, k1, k2, n > 0 && n != 5, prev_c, prev_p, c);
      prev_c = c; prev_p = p;
      if (n == 4) begin
        // the key pair changes at n = 5: decrypt the last block now, under the old keys
        step(rand_blk(), k1, k2, 1, prev_c, prev_p, c);
        prev_c = c;
      end
    end
    checks++;
    if (n_enc == 0 || n_dec == 0 || n_roundtrip == 0 || n_overlap == 0 || n_ignored == 0
        || n_random == 0 || n_equal == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("encryptions=%0d decryptions=%0d round trips=%0d overlap cycles=%0d ignored starts=%0d random cycles=%0d equal-key blocks=%0d",
             n_enc, n_dec, n_roundtrip, n_overlap, n_ignored, n_random, n_equal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
