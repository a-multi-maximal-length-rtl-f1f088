// switch_control: toggle flip-flop that positions the feedback tap switch.
//
// The design uses a JK flip-flop with J = K = Hit, i.e. in toggle mode: the
// output flips on every clock edge at which hit_i is high and holds
// otherwise. Driven by a Hit that lasts one clock every M clocks, its output
// stays low for M clocks, then high for M clocks, and so on. The toggle
// behaviour and starting low (low for the first M clocks) follow the
// original description; using the system clock with T = Hit rather than
// clocking the flip-flop by Hit is this design's choice.
//
// Interface: clk_i, rst_ni (asynchronous, active low, output -> TAP_T2),
// hit_i. Output sel_o (registered), the switch position as a tap_sel_e.
module switch_control
  import prbs_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     hit_i,
  output tap_sel_e sel_o
);

  tap_sel_e sel_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    sel_q <= TAP_T2;
    else if (hit_i) sel_q <= (sel_q == TAP_T1) ? TAP_T2 : TAP_T1;
  end

  assign sel_o = sel_q;

endmodule
