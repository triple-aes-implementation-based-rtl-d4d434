// aes_dec_sdrr: iterative AES-128 decryption core with secure double rate
// registers (SDRRs) as pipeline registers.
//
// The inverse cipher runs on a four-stage pipeline that mirrors the
// encryption core, with the inverse layers:
//   state -> InvShiftRows -> [SDRR isr] -> InvSubBytes -> [SDRR isb]
//   -> AddRoundKey (XOR) -> [SDRR ark] -> InvMixColumns -> round mux -> [SDRR st]
// Round 0 loads ciphertext XOR round key 10 into the state; rounds 1..9 use
// round keys 9..1 and InvMixColumns; round 10 uses round key 0 and bypasses
// InvMixColumns, giving the plaintext. Each round takes 4 reference cycles.
// The round keys are needed in reverse order: after start the key register
// first steps forward ten times (10 reference cycles) to reach round key 10,
// then steps backward once per round. A block therefore takes 10 + 44 = 54
// reference cycles. That the decryption reverses the encryption with the
// inverse layers follows the design's description; the pipeline order, the
// key handling and the cycle count are this design's choices.
//
// SDRR timing, rng use and the start/busy/done handshake are the same as in
// aes_enc_sdrr: clk is the double-rate clock, sel the reference clock, and a
// block takes 54 real edges (108 clk cycles).
module aes_dec_sdrr
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sel,
  input  state_t rng,
  input  logic   start,
  input  state_t key,
  input  state_t ct,
  output logic   busy,
  output logic   done,
  output state_t pt
);
  localparam int unsigned KEY_STEPS  = NR;                      // 10
  localparam int unsigned DEC_CYCLES = KEY_STEPS + ENC_CYCLES;  // 54

  logic       real_edge;
  logic [5:0] cnt;
  logic [5:0] c;
  logic       pre;
  logic [3:0] rnd;
  logic [1:0] phase;
  state_t     ct_q, rk;
  state_t     isr_d, isb_d, ark_d, imc_d, st_d;
  state_t     isr_q, isb_q, ark_q, st_q;
  logic       key_step, key_fwd;
  logic [3:0] key_rnd;

  assign real_edge = !sel;
  assign pre       = cnt < 6'(KEY_STEPS);
  assign c         = cnt - 6'(KEY_STEPS);
  assign rnd       = c[5:2];
  assign phase     = c[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      ct_q <= '0;
      pt   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
          ct_q <= ct;
        end
      end else if (real_edge) begin
        if (cnt == 6'(DEC_CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          pt   <= st_d;
        end
        cnt <= cnt + 6'd1;
      end
    end
  end

  // key steps: 10 forward steps, then one backward step after each use
  always_comb begin
    key_step = 1'b0;
    key_fwd  = 1'b1;
    key_rnd  = 4'd0;
    if (busy && real_edge) begin
      if (pre) begin
        key_step = 1'b1;
        key_rnd  = 4'(cnt) + 4'd1;
      end else if (rnd == 4'd0 && phase == 2'd3) begin
        key_step = 1'b1;
        key_fwd  = 1'b0;
        key_rnd  = 4'(NR);
      end else if (rnd != 4'd0 && rnd < 4'(NR) && phase == 2'd2) begin
        key_step = 1'b1;
        key_fwd  = 1'b0;
        key_rnd  = 4'(NR) - rnd;
      end
    end
  end

  aes_key_sched u_key (
    .clk  (clk),
    .rst_n(rst_n),
    .load (!busy && start),
    .key  (key),
    .step (key_step),
    .fwd  (key_fwd),
    .rnd  (key_rnd),
    .rk   (rk)
  );

  // round layers
  aes_shift_rows  #(.INVERSE(1'b1)) u_isr (.d(st_q),  .q(isr_d));
  aes_sub_bytes   #(.INVERSE(1'b1)) u_isb (.d(isr_q), .q(isb_d));
  assign ark_d = isb_q ^ rk;
  aes_mix_columns #(.INVERSE(1'b1)) u_imc (.d(ark_q), .q(imc_d));

  always_comb begin
    if (rnd == 4'd0)        st_d = ct_q ^ rk;
    else if (rnd == 4'(NR)) st_d = ark_q;
    else                    st_d = imc_d;
  end

  // protected pipeline registers
  sdrr #(.WIDTH(128)) u_reg_isr (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(isr_d),
                                .rnd_in(rng), .data_out(isr_q));
  sdrr #(.WIDTH(128)) u_reg_isb (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(isb_d),
                                .rnd_in({rng[95:0], rng[127:96]}), .data_out(isb_q));
  sdrr #(.WIDTH(128)) u_reg_ark (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(ark_d),
                                .rnd_in({rng[63:0], rng[127:64]}), .data_out(ark_q));
  sdrr #(.WIDTH(128)) u_reg_st  (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(st_d),
                                .rnd_in({rng[31:0], rng[127:32]}), .data_out(st_q));

endmodule
