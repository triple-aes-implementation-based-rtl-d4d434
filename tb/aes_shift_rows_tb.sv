// aes_shift_rows_tb: checks ShiftRows and InvShiftRows against the FIPS-197
// round 1 example and the reference model on random states, and that the
// inverse undoes the forward layer.
module aes_shift_rows_tb;
  import aes_ref_pkg::*;
  logic [127:0] d, q_fwd, q_inv, q_back;
  int checks = 0, failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) u_fwd (.d(d), .q(q_fwd));
  aes_shift_rows #(.INVERSE(1'b1)) u_inv (.d(d), .q(q_inv));
  aes_shift_rows #(.INVERSE(1'b1)) u_back (.d(q_fwd), .q(q_back));

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
    // FIPS-197 appendix B, round 1: after SubBytes -> after ShiftRows
    d = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    check(q_fwd, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS round 1 ShiftRows");
    check(q_back, d, "FIPS round 1 inverse");
    for (int n = 0; n < 200; n++) begin
      d = rand_blk();
      #1;
      check(q_fwd, from_bytes(shift_rows(to_bytes(d), 0)), "ShiftRows");
      check(q_inv, from_bytes(shift_rows(to_bytes(d), 1)), "InvShiftRows");
      check(q_back, d, "InvShiftRows(ShiftRows(x))");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
