// prbs_top_tb: end-to-end test of the multi maximal length generator at its
// default (and only) size.
//
// The expected output is built from the behaviour of the design, not from
// its structure: clock c (counted from reset release) lies in segment
// j = c div 7; the register holds preset (j mod 8) at the start of the
// segment, the tap is t2 when (c div 56) is even and t1 otherwise, and each
// output bit is (Q2 xor tap) or (Q == 000), after which the register shifts
// that bit in. Four full periods of 112 are compared bit by bit, along with
// the register contents, the segment-end strobe (exactly every 7 clocks)
// and the period-14 generator beside it.
//
// It then checks the period: the output repeats every 112 clocks and with
// no shorter period dividing 112. Each mechanism must occur: segment ends
// (preset loads), every one of the 8 preset values, tap switches in both
// directions, and the zero escape (state 000 producing a 1).
module prbs_top_tb;
  import prbs_pkg::*;

  localparam int Periods = 4;
  localparam int Cycles  = Periods * FullLen;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prbs, seg_end, prbs14;
  tap_sel_e tap_sel, tap14;
  logic [2:0] preset, state;
  logic got [Cycles];
  int checks = 0, failures = 0;
  int n_seg_end = 0, n_sw_up = 0, n_sw_down = 0, n_zero = 0;
  int n_preset [8];
  int last_seg_end = -1;

  prbs_top dut (.clk_i(clk), .rst_ni(rst_n), .prbs_o(prbs), .tap_sel_o(tap_sel),
                .seg_end_o(seg_end), .preset_o(preset), .state_o(state),
                .prbs14_o(prbs14), .prbs14_tap_sel_o(tap14));

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
    static logic [2:0] s = 3'b000, s14 = 3'b000;
    tap_sel_e prev_sel;
    foreach (n_preset[k]) n_preset[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_sel = tap_sel;
    for (int c = 0; c < Cycles; c++) begin
      automatic int j = c / 7;
      automatic logic t1 = ((c / 56) % 2) == 1;
      logic tap, exp;
      automatic logic t1_14 = ((c / 7) % 2) == 1;
      logic exp14;
      if (c % 7 == 0) s = 3'(j % 8);
      tap = t1 ? s[0] : s[1];
      exp = (s[2] ^ tap) | (s == 3'b000);
      check("register state", c, state == s);
      check("tap position", c, tap_sel == (t1 ? TAP_T1 : TAP_T2));
      check("prbs bit", c, prbs == exp);
      check("segment end every 7 clocks", c, seg_end == (c % 7 == 6));
      if (c % 7 == 0) n_preset[s]++;
      if (s == 3'b000 && prbs) n_zero++;
      if (seg_end) begin
        n_seg_end++;
        if (last_seg_end >= 0) check("segment length", c, c - last_seg_end == 7);
        last_seg_end = c;
        check("next preset", c, preset == 3'((j + 1) % 8));
      end
      if (tap_sel != prev_sel) begin
        if (tap_sel == TAP_T1) n_sw_up++; else n_sw_down++;
        check("switch every 56 clocks", c, c % 56 == 0);
      end
      prev_sel = tap_sel;
      // Period-14 generator beside it.
      tap = t1_14 ? s14[0] : s14[1];
      exp14 = (s14[2] ^ tap) | (s14 == 3'b000);
      check("prbs14 bit", c, prbs14 == exp14);
      check("prbs14 tap", c, tap14 == (t1_14 ? TAP_T1 : TAP_T2));
      s14 = {s14[1:0], exp14};
      got[c] = prbs;
      s = {s[1:0], exp};
      @(negedge clk);
    end

    // Period 112, and no shorter period that divides it.
    for (int c = 0; c + FullLen < Cycles; c++)
      check("period 112", c, got[c] == got[c + FullLen]);
    for (int d = 1; d < FullLen; d++) begin
      if (FullLen % d == 0) begin
        automatic logic differs = 1'b0;
        for (int c = 0; c + d < FullLen; c++) if (got[c] != got[c + d]) differs = 1'b1;
        check("no shorter period", d, differs);
      end
    end

    // Every mechanism must have happened.
    check("segment ends seen", 0, n_seg_end == Cycles / 7);
    foreach (n_preset[k]) check("preset value used", k, n_preset[k] == Cycles / 56);
    check("switch to t1 seen", 0, n_sw_up > 0);
    check("switch to t2 seen", 0, n_sw_down > 0);
    check("zero escape seen", 0, n_zero > 0);
    $display("segment ends (preset loads) %0d, switches to t1 %0d, to t2 %0d, zero escapes %0d",
             n_seg_end, n_sw_up, n_sw_down, n_zero);
    $write("output, first 112 bits: ");
    for (int c = 0; c < FullLen; c++) $write("%0d", got[c]);
    $write("\n");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
