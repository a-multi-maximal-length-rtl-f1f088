// lfsr_core: shift register with a switchable feedback tap, an all-zero
// escape and per-stage preset/clear inputs.
//
// Stages D0..D(N-1) shift towards the last stage on every clock. The feedback
// bit is the last stage XORed with one intermediate tap chosen by tap_sel:
// TAP_T1 picks the stage at index TapT1 (t1, the output of D0), TAP_T2 picks
// the stage at index TapT2 (t2, the output of D1). An AND of all inverted
// stage outputs is ORed into the feedback, so the all-zero state (which an
// XOR-only register would never leave) is followed by a 1. The OR output is
// both the PRBS output and the input of D0.
//
// In front of every stage an OR gate adds prt_i (preset), and clr_ni (active
// low) clears the stage. With prt = 0 and clr_n = all ones the register just
// shifts; with prt = B and clr_n = B it loads the value B. The original
// circuit drives the flip-flops' asynchronous clear pins. By default
// (AsyncClear = 0, a choice of this design) the clear acts at the clock edge
// like the preset, so a whole segment is shifted out before the load. With
// AsyncClear = 1 the drawn behaviour is modelled at cycle level without real
// asynchronous pins: a stage whose clear is low reads as 0 for the whole
// cycle (q_o, the tap, the XOR and the shift all see the cleared value), and
// the register still holds B after the edge.
//
// Interface: clk_i, rst_ni (asynchronous, active low, register -> ResetState),
// tap_sel_i, prt_i[N-1:0], clr_ni[N-1:0]. Outputs: q_o (stage outputs, bit i
// = D_i) and prbs_o, a combinational function of q_o and tap_sel_i valid in
// the same cycle; one new output bit per clock.
module lfsr_core
  import prbs_pkg::*;
#(
  parameter int unsigned N          = NStages,
  parameter int unsigned TapT1      = 0,   // t1: output of D0
  parameter int unsigned TapT2      = 1,   // t2: output of D1
  parameter logic [N-1:0] ResetState = '0,
  parameter bit           AsyncClear = 1'b0
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  tap_sel_e     tap_sel_i,
  input  logic [N-1:0] prt_i,
  input  logic [N-1:0] clr_ni,
  output logic [N-1:0] q_o,
  output logic         prbs_o
);

  logic [N-1:0] q_q, q, d;
  logic         tap, fb_xor, all_zero;

  // Stage outputs as the gates see them.
  assign q = AsyncClear ? (q_q & clr_ni) : q_q;

  // Tap switch, XOR with the last stage, zero escape.
  assign tap      = (tap_sel_i == TAP_T1) ? q[TapT1] : q[TapT2];
  assign fb_xor   = q[N-1] ^ tap;
  assign all_zero = &(~q);
  assign prbs_o   = fb_xor | all_zero;

  // Stage inputs: shifted value ORed with the preset, then the clear.
  always_comb begin
    d[0] = prbs_o | prt_i[0];
    for (int unsigned i = 1; i < N; i++) begin
      d[i] = q[i-1] | prt_i[i];
    end
    d = d & clr_ni;
  end

  if (!(TapT1 < N - 1 && TapT2 < N - 1 && TapT1 != TapT2)) begin : g_bad_taps
    $error("lfsr_core: taps must be two different intermediate stages");
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) q_q <= ResetState;
    else         q_q <= d;
  end

  assign q_o = q;

endmodule
