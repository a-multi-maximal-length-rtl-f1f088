// prbs14_gen: PRBS generator of period 14 built from one 3-stage register
// whose feedback tap is switched every 7 clocks.
//
// A modulo-7 counter gives a one-clock Hit every seventh clock; the toggle
// flip-flop (switch control) flips on each Hit and moves the tap switch
// between t2 and t1. Each tap alone gives a maximal-length sequence of 7
// bits, and 7 shifts bring the register back to the state it started from,
// so the output repeats the 7-bit pattern of t2 followed by the 7-bit pattern
// of t1: period 14. No presets are used (all preset inputs low, clears
// inactive). After reset the register holds 000; the zero escape turns that
// into the first 1, so the first 7 bits pass through state 000 once and the
// output is periodic with period 14 from clock 7 on.
//
// Interface: clk_i, rst_ni (asynchronous, active low). Outputs prbs_o (one bit
// per clock, combinational from registers) and tap_sel_o (switch position in
// the same cycle).
module prbs14_gen
  import prbs_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  output logic     prbs_o,
  output tap_sel_e tap_sel_o
);

  localparam int unsigned CntW = $clog2(SegLen);

  // The counter bits and the stage outputs are not used here: only the Hit
  // and the PRBS output leave this generator, as in the original circuit.
  logic [CntW-1:0]    cnt;
  logic               hit;
  logic [NStages-1:0] q;

  mod_counter #(.Mod(SegLen)) u_counter (
    .clk_i, .rst_ni, .inc_i(1'b1), .count_o(cnt), .hit_o(hit)
  );

  switch_control u_switch_control (
    .clk_i, .rst_ni, .hit_i(hit), .sel_o(tap_sel_o)
  );

  lfsr_core #(.N(NStages)) u_lfsr (
    .clk_i, .rst_ni,
    .tap_sel_i(tap_sel_o),
    .prt_i    ('0),
    .clr_ni   ('1),
    .q_o      (q),
    .prbs_o
  );

endmodule
