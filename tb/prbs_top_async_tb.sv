// prbs_top_async_tb: end-to-end test of the generator with AsyncClear = 1,
// the cycle-level model of the original circuit's asynchronous clears.
//
// The reference is the one of prbs_top_tb with one change: in the last cycle
// of segment j (clock 7j+6) the stages that the coming preset (j+1) mod 8
// clears already read as 0, so that cycle's output bit comes from
// state & preset. The register still starts every segment from the preset.
// Four periods are compared bit by bit; the output must repeat with period
// 112 and no shorter divisor period, and the number of segments whose last
// bit differs from the default design is counted and must be nonzero.
module prbs_top_async_tb;
  import prbs_pkg::*;

  localparam int Periods = 4;
  localparam int Cycles  = Periods * FullLen;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prbs, seg_end, prbs14, prbs_sync;
  tap_sel_e tap_sel, tap14;
  logic [2:0] preset, state;
  logic got [Cycles];
  int checks = 0, failures = 0, n_changed = 0, n_masked = 0;

  prbs_top #(.AsyncClear(1'b1)) dut (
    .clk_i(clk), .rst_ni(rst_n), .prbs_o(prbs), .tap_sel_o(tap_sel),
    .seg_end_o(seg_end), .preset_o(preset), .state_o(state),
    .prbs14_o(prbs14), .prbs14_tap_sel_o(tap14));

  // Default design alongside, to count where the two differ.
  prbs_top dut_sync (
    .clk_i(clk), .rst_ni(rst_n), .prbs_o(prbs_sync), .tap_sel_o(),
    .seg_end_o(), .preset_o(), .state_o(), .prbs14_o(), .prbs14_tap_sel_o());

  always #5 clk = ~clk;

  initial begin
    repeat (Cycles + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int c, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at clock %0d: state=%03b prbs=%b tap=%0d preset=%03b",
               what, c, state, prbs, tap_sel, preset);
    end
  endtask

  initial begin
    static logic [2:0] s = 3'b000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < Cycles; c++) begin
      automatic int j = c / 7;
      automatic logic t1 = ((c / 56) % 2) == 1;
      logic tap, exp;
      if (c % 7 == 0) s = 3'(j % 8);
      if (c % 7 == 6) begin
        if ((s & 3'((j + 1) % 8)) != s) n_masked++;
        s = s & 3'((j + 1) % 8);
      end
      tap = t1 ? s[0] : s[1];
      exp = (s[2] ^ tap) | (s == 3'b000);
      check("register state", c, state == s);
      check("tap position", c, tap_sel == (t1 ? TAP_T1 : TAP_T2));
      check("prbs bit", c, prbs == exp);
      check("segment end every 7 clocks", c, seg_end == (c % 7 == 6));
      if (prbs != prbs_sync) begin
        n_changed++;
        check("differs only in last cycle of a segment", c, c % 7 == 6);
      end
      got[c] = prbs;
      s = {s[1:0], exp};
      @(negedge clk);
    end
    for (int c = 0; c + FullLen < Cycles; c++)
      check("period 112", c, got[c] == got[c + FullLen]);
    for (int d = 1; d < FullLen; d++) begin
      if (FullLen % d == 0) begin
        automatic logic differs = 1'b0;
        for (int c = 0; c + d < FullLen; c++) if (got[c] != got[c + d]) differs = 1'b1;
        check("no shorter period", d, differs);
      end
    end
    check("early clears seen", 0, n_masked > 0);
    check("output bits changed by early clears", 0, n_changed > 0);
    $display("segment ends with early clears %0d, output bits changed %0d", n_masked, n_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
