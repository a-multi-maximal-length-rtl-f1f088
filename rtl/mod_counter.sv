// mod_counter: modulo-Mod event counter with a Hit output and its count bits.
//
// The count advances by one, wrapping from Mod-1 to 0, on every clock edge
// where inc_i is high (counter 1 of the generator has inc_i tied high and so
// counts clock pulses; counter 2 counts the Hit pulses of counter 1). hit_o
// is high for the cycle in which an event arrives while the count equals
// HitValue, so each Hit lasts one clock and marks the edge that completes
// Mod events. count_o gives the bits (B2..B0 for a 3-bit counter).
//
// The moduli (7 and 8) and the Hit and B outputs follow the original
// description, which shows the counters only as blocks; the encoding (plain
// binary), the Hit timing and the reset value are this design's choices. ResetValue and
// HitValue let counter 2 start one step ahead (see prbs_top).
//
// Interface: clk_i, rst_ni (asynchronous, active low), inc_i. Outputs
// count_o[W-1:0] (registered) and hit_o (combinational from inc_i and count).
module mod_counter #(
  parameter int unsigned Mod        = 7,
  parameter int unsigned W          = (Mod > 1) ? $clog2(Mod) : 1,
  parameter int unsigned ResetValue = 0,
  parameter int unsigned HitValue   = Mod - 1
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         inc_i,
  output logic [W-1:0] count_o,
  output logic         hit_o
);

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= W'(ResetValue);
    end else if (inc_i) begin
      cnt_q <= (cnt_q == W'(Mod - 1)) ? '0 : cnt_q + 1'b1;
    end
  end

  a_count_in_range: assert property (
    @(posedge clk_i) disable iff (!rst_ni) int'(cnt_q) < int'(Mod))
    else $error("mod_counter: count %0d out of range", cnt_q);

  assign count_o = cnt_q;
  assign hit_o   = inc_i && (cnt_q == W'(HitValue));

endmodule
