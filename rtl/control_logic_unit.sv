// control_logic_unit: turns the Hit of counter 1 and the count bits of
// counter 2 into preset and clear signals for the shift register stages.
//
// Pure gates, as drawn in the design: PRT_i = B_i AND Hit and
// !CLR_i = B_i OR NOT Hit. While Hit is low every PRT is 0 and every !CLR is
// 1, so the register shifts freely. While Hit is high, stages whose B bit is
// 1 get a preset and stages whose B bit is 0 get a clear, so on that clock
// edge the register takes the value B.
//
// Interface: hit_i, b_i[N-1:0] (B2..B0 for N = 3). Outputs prt_o[N-1:0] and
// clr_no[N-1:0] (active low). Combinational, no clock.
module control_logic_unit
  import prbs_pkg::*;
#(
  parameter int unsigned N = NStages
) (
  input  logic         hit_i,
  input  logic [N-1:0] b_i,
  output logic [N-1:0] prt_o,
  output logic [N-1:0] clr_no
);

  always_comb begin
    prt_o  = b_i & {N{hit_i}};
    clr_no = b_i | {N{~hit_i}};
  end

endmodule
