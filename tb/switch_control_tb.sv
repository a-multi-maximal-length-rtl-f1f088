// switch_control_tb: self-checking test of the toggle flip-flop.
//
// After reset the switch must select t2. Random Hit pulses are applied; the
// output must flip exactly on the clock edges where Hit is high. A second
// phase drives Hit once every 7 clocks and checks the output is low for 7
// clocks and high for the next 7.
module switch_control_tb;
  import prbs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, hit = 1'b0;
  tap_sel_e sel;
  int checks = 0, failures = 0, cycles = 0, toggles = 0;

  switch_control dut (.clk_i(clk), .rst_ni(rst_n), .hit_i(hit), .sel_o(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d: sel=%0d", what, cycles, sel);
    end
  endtask

  initial begin
    static logic exp_sel = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset selects t2", sel == TAP_T2);
    for (cycles = 0; cycles < 1000; cycles++) begin
      hit = ($urandom_range(3) == 0);
      @(negedge clk);
      if (hit) begin exp_sel = ~exp_sel; toggles++; end
      check("toggle", sel == tap_sel_e'(exp_sel));
    end
    // Hit every seventh clock: 7 low, 7 high.
    hit = 1'b0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 140; c++) begin
      hit = (c % 7 == 6);
      check("7 low / 7 high", sel == (((c / 7) % 2) ? TAP_T1 : TAP_T2));
      @(negedge clk);
    end
    check("toggles seen", toggles > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
