// prbs_top: multi maximal length PRBS generator of period 112, with the
// period-14 generator alongside.
//
// Main generator. A 3-stage shift register (lfsr_core) runs with feedback tap
// t1 or t2, each giving a 7-bit maximal-length sequence. Counter 1 (modulo 7)
// marks the end of every 7-clock segment with a one-clock Hit. On that clock
// the control and logic unit turns the bits B2..B0 of counter 2 (modulo 8)
// into presets and clears, so the register starts the next segment from the
// value B. The presets run 000, 001, ..., 111 and repeat every 56 clocks.
// Counter 2's own Hit, once per 56 clocks, toggles the switch control, so
// the first 56 clocks use tap t2 and the next 56 use tap t1: 2 taps x 8
// presets x 7 bits = 112-bit period.
//
// Timing. After reset the register holds 000 (the first preset), counter 1 is
// 0 and counter 2 is 1. Segment j (j = 0, 1, ...) covers clocks 7j+1 .. 7j+7,
// i.e. the 7 cycles after clock edge 7j, and starts from preset j mod 8, with
// tap t2 when (j div 8) is even and t1 when it is odd. Counter 2 resets to 1
// because the preset of segment 0 is applied by reset; in the original
// circuit counter 2 steps as soon as counter 1's Hit rises, within the same
// clock, which gives the same order of presets. The tap is switched on the
// same clock edge that loads preset 000.
//
// AsyncClear = 1 selects the cycle-level model of the asynchronous clears of
// the original circuit (see lfsr_core): the stages that the coming preset
// clears read as 0 already during the segment's last cycle, which changes
// that cycle's output bit. The default (0) clears at the edge.
//
// The second generator (prbs14_gen) is the simpler variant without counter 2
// and presets; it has its own output.
//
// Interface: clk_i, rst_ni (asynchronous, active low). Outputs: prbs_o (one
// bit per clock), tap_sel_o, seg_end_o (counter 1 Hit: last clock of a
// segment), preset_o (B2..B0: preset loaded at the end of this segment),
// state_o (register stages), prbs14_o and prbs14_tap_sel_o.
module prbs_top
  import prbs_pkg::*;
#(
  parameter bit AsyncClear = 1'b0  // see lfsr_core
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  output logic               prbs_o,
  output tap_sel_e           tap_sel_o,
  output logic               seg_end_o,
  output logic [NStages-1:0] preset_o,
  output logic [NStages-1:0] state_o,
  output logic               prbs14_o,
  output tap_sel_e           prbs14_tap_sel_o
);

  localparam int unsigned Cnt1W = $clog2(SegLen);

  logic [Cnt1W-1:0]   cnt1;
  logic               hit1, hit2;
  logic [NStages-1:0] b;
  logic [NStages-1:0] prt, clr_n;

  // Counter 1: modulo 7 on the clock, Hit on every seventh clock.
  mod_counter #(.Mod(SegLen)) u_counter1 (
    .clk_i, .rst_ni, .inc_i(1'b1), .count_o(cnt1), .hit_o(hit1)
  );

  // Counter 2: modulo 8 on the Hits of counter 1; bits B2..B0 = next preset.
  mod_counter #(.Mod(NPresets), .W(NStages), .ResetValue(1), .HitValue(0))
    u_counter2 (
      .clk_i, .rst_ni, .inc_i(hit1), .count_o(b), .hit_o(hit2)
    );

  control_logic_unit #(.N(NStages)) u_clu (
    .hit_i(hit1), .b_i(b), .prt_o(prt), .clr_no(clr_n)
  );

  switch_control u_switch_control (
    .clk_i, .rst_ni, .hit_i(hit2), .sel_o(tap_sel_o)
  );

  lfsr_core #(.N(NStages), .AsyncClear(AsyncClear)) u_lfsr (
    .clk_i, .rst_ni,
    .tap_sel_i(tap_sel_o),
    .prt_i    (prt),
    .clr_ni   (clr_n),
    .q_o      (state_o),
    .prbs_o
  );

  // Counter 2 only hits on a Hit of counter 1, and every segment end loads
  // the preset that counter 2 offered.
  a_hit2_on_hit1: assert property (
    @(posedge clk_i) disable iff (!rst_ni) hit2 |-> hit1);
  a_preset_loaded: assert property (
    @(posedge clk_i) disable iff (!rst_ni) hit1 |=> state_o == $past(b));

  assign seg_end_o = hit1;
  assign preset_o  = b;

  prbs14_gen u_prbs14 (
    .clk_i, .rst_ni, .prbs_o(prbs14_o), .tap_sel_o(prbs14_tap_sel_o)
  );

endmodule
