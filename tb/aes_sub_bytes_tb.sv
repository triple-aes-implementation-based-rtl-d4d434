// aes_sub_bytes_tb: checks the SubBytes and InvSubBytes layers against the
// reference S-box of aes_ref_pkg (all 256 byte values in every byte lane,
// FIPS-197 S-box samples, and random states), and that the inverse layer
// undoes the forward one.
module aes_sub_bytes_tb;
  import aes_ref_pkg::*;
  logic [127:0] d, q_fwd, q_inv, q_back;
  int checks = 0, failures = 0;

  aes_sub_bytes #(.INVERSE(1'b0)) u_fwd (.d(d), .q(q_fwd));
  aes_sub_bytes #(.INVERSE(1'b1)) u_inv (.d(d), .q(q_inv));
  aes_sub_bytes #(.INVERSE(1'b1)) u_back (.d(q_fwd), .q(q_back));

  initial begin
    #100000;
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

  initial begin
    // FIPS-197 samples: S(00)=63, S(53)=ed, S(ff)=16
    d = {8'h00, 8'h53, 8'hff, {13{8'h00}}};
    #1;
    check(q_fwd[127:104], 24'h63ed16, "fips samples");
    for (int v = 0; v < 256; v++) begin
      logic [127:0] ef, ei;
      d = {16{8'(v)}} ^ {8'h00, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77,
                         8'h88, 8'h99, 8'haa, 8'hbb, 8'hcc, 8'hdd, 8'hee, 8'hff};
      #1;
      for (int b = 0; b < 16; b++) begin
        ef[8*b +: 8] = sbox(d[8*b +: 8]);
        ei[8*b +: 8] = inv_sbox(d[8*b +: 8]);
      end
      check(q_fwd, ef, "SubBytes");
      check(q_inv, ei, "InvSubBytes");
      check(q_back, d, "InvSubBytes(SubBytes(x))");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
