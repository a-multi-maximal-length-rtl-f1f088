// prbs14_gen_tb: self-checking test of the period-14 generator.
//
// The expected bits come from a model of the behaviour: the register starts
// at 000, the tap is t2 for clocks 0..6, t1 for 7..13, and so on, and each
// bit is (Q2 xor tap) or (Q == 000). Besides the bit-by-bit comparison the
// test checks that the output repeats with period 14 from clock 7 on, that
// it does not repeat with period 7, and that the tap switch position changes
// every 7 clocks.
module prbs14_gen_tb;
  import prbs_pkg::*;

  localparam int Cycles = 14 * 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prbs;
  tap_sel_e tap_sel;
  logic got [Cycles];
  int checks = 0, failures = 0, switches = 0;

  prbs14_gen dut (.clk_i(clk), .rst_ni(rst_n), .prbs_o(prbs), .tap_sel_o(tap_sel));

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
      $display("FAIL %s at clock %0d", what, c);
    end
  endtask

  initial begin
    static logic [2:0] s = 3'b000;
    tap_sel_e prev_sel;
    static logic differs7 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_sel = tap_sel;
    for (int c = 0; c < Cycles; c++) begin
      automatic logic t1 = ((c / 7) % 2) == 1;
      automatic logic tap = t1 ? s[0] : s[1];
      automatic logic exp = (s[2] ^ tap) | (s == 3'b000);
      check("tap position", c, tap_sel == (t1 ? TAP_T1 : TAP_T2));
      check("prbs bit", c, prbs == exp);
      if (tap_sel != prev_sel) switches++;
      prev_sel = tap_sel;
      got[c] = prbs;
      s = {s[1:0], exp};
      @(negedge clk);
    end
    for (int c = 7; c + 14 < Cycles; c++) begin
      check("period 14", c, got[c] == got[c + 14]);
      if (got[c] != got[c + 7]) differs7 = 1'b1;
    end
    check("not period 7", 0, differs7);
    check("tap switched", 0, switches >= Cycles / 7 - 1);
    $display("tap switches %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
