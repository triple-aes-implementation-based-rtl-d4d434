// sdrr: secure double rate register.
//
// A two-input multiplexer selects, under sel, either the real input data
// (sel = 0) or random data (sel = 1); its output feeds two registers in
// cascade, both clocked by ck on every rising edge, and the second register is
// the output. ck runs at twice the rate of the reference (unprotected) design
// and sel is the reference clock, i.e. it toggles on every ck edge. Real and
// random words therefore alternate inside the register pair: during cycles
// with sel = 0 the output carries real data, during sel = 1 cycles it carries
// random data, so the logic downstream evaluates random data for half of every
// reference period and each register alternately holds real and random words.
// A real word written on a sel = 0 edge reaches the output one ck cycle later
// and stays there for one ck cycle, i.e. the register delays real data by one
// reference cycle, as the plain register it replaces.
//
// The mux-plus-two-registers structure and the select polarity are those of
// the SDRR block diagram; the reset to zero is this design's choice.
module sdrr #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             ck,
  input  logic             rst_n,
  input  logic             sel,
  input  logic [WIDTH-1:0] data_in,
  input  logic [WIDTH-1:0] rnd_in,
  output logic [WIDTH-1:0] data_out
);
  logic [WIDTH-1:0] r1;

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      r1       <= '0;
      data_out <= '0;
    end else begin
      r1       <= sel ? rnd_in : data_in;
      data_out <= r1;
    end
  end
endmodule
