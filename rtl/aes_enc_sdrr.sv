// aes_enc_sdrr: iterative AES-128 encryption core whose pipeline registers are
// secure double rate registers (SDRRs).
//
// Datapath: the reference architecture of an iterative core with a four-stage
// internal pipeline, one stage per round layer:
//   state -> SubBytes -> [SDRR sb] -> ShiftRows -> [SDRR sr] -> MixColumns
//   -> [SDRR mc] -> round mux -> AddRoundKey (XOR) -> [SDRR st] -> back to SubBytes
// The round mux takes the plaintext register in round 0, the ShiftRows stage
// (MixColumns bypassed) in round 10 and the MixColumns stage otherwise. Round r
// uses phases 0..3: SubBytes result registered at phase 0, ShiftRows at 1,
// MixColumns at 2, AddRoundKey at 3. Round 0 only uses phase 3. In round 10
// the AddRoundKey register is written at phase 2 straight from the ShiftRows
// register, and at phase 3 the output mux copies it to ct. A round thus takes
// 4 reference cycles and a block 11 x 4 = 44 reference cycles, as in the
// reference design this core follows. The SDRR replacement of every
// pipeline register is the protection scheme of the design.
//
// SDRR timing: clk is the double-rate clock and sel the reference clock
// (toggling every clk). Edges of clk with sel = 0 are "real" edges: the SDRRs
// capture real data and the controller advances one step. On the other edges
// the SDRRs capture random words (rng, rotated by 32 bits per stage so that
// stages differ), so the combinational layers evaluate random data during
// every other clk cycle. One block takes 44 real edges, i.e. 88 clk cycles.
//
// Interface: when busy = 0, start = 1 on any clk edge captures pt and key; the
// ciphertext appears on ct with a one-clk done pulse after the 44th real edge
// and stays on ct until the next block ends. busy is high in between. The
// plaintext register and the round key register are plain registers: only the
// registers of the round pipeline are protected. The handshake, the reset and
// the idle cycles of round 0 (it only uses its fourth phase, to keep 4 phases
// per round) are this design's choices.
module aes_enc_sdrr
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sel,
  input  state_t rng,
  input  logic   start,
  input  state_t key,
  input  state_t pt,
  output logic   busy,
  output logic   done,
  output state_t ct
);
  logic       real_edge;
  logic [5:0] cnt;
  logic [3:0] rnd;
  logic [1:0] phase;
  state_t     pt_q, rk;
  state_t     sb_d, sr_d, mc_d, st_d;
  state_t     sb_q, sr_q, mc_q, st_q;
  state_t     ark_sel;

  assign real_edge = !sel;
  assign rnd       = cnt[5:2];
  assign phase     = cnt[1:0];

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      pt_q <= '0;
      ct   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
          pt_q <= pt;
        end
      end else if (real_edge) begin
        if (cnt == 6'(ENC_CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          ct   <= st_q;
        end
        cnt <= cnt + 6'd1;
      end
    end
  end

  aes_key_sched u_key (
    .clk  (clk),
    .rst_n(rst_n),
    .load (!busy && start),
    .key  (key),
    .step (busy && real_edge && phase == 2'd3 && rnd < 4'(NR)),
    .fwd  (1'b1),
    .rnd  (rnd + 4'd1),
    .rk   (rk)
  );

  // round layers
  aes_sub_bytes   #(.INVERSE(1'b0)) u_sb (.d(st_q), .q(sb_d));
  aes_shift_rows  #(.INVERSE(1'b0)) u_sr (.d(sb_q), .q(sr_d));
  aes_mix_columns #(.INVERSE(1'b0)) u_mc (.d(sr_q), .q(mc_d));

  always_comb begin
    if (rnd == 4'd0)        ark_sel = pt_q;
    else if (rnd == 4'(NR)) ark_sel = sr_q;
    else                    ark_sel = mc_q;
    st_d = ark_sel ^ rk;
  end

  // protected pipeline registers
  sdrr #(.WIDTH(128)) u_reg_sb (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(sb_d),
                               .rnd_in(rng), .data_out(sb_q));
  sdrr #(.WIDTH(128)) u_reg_sr (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(sr_d),
                               .rnd_in({rng[95:0], rng[127:96]}), .data_out(sr_q));
  sdrr #(.WIDTH(128)) u_reg_mc (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(mc_d),
                               .rnd_in({rng[63:0], rng[127:64]}), .data_out(mc_q));
  sdrr #(.WIDTH(128)) u_reg_st (.ck(clk), .rst_n(rst_n), .sel(sel), .data_in(st_d),
                               .rnd_in({rng[31:0], rng[127:32]}), .data_out(st_q));

endmodule
