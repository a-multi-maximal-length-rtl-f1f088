// mod_counter_tb: self-checking test of the modulo counter.
//
// Two instances: modulo 7 counting every clock (counter 1 of the generator),
// and modulo 8 counting random events with reset value 1 and Hit at count 0
// (counter 2). Count and Hit are compared every cycle with a software model;
// the gap between Hits of the clock-driven counter must be exactly 7 clocks.
module mod_counter_tb;

  logic clk = 1'b0, rst_n = 1'b0, inc2 = 1'b0;
  logic [2:0] cnt1, cnt2;
  logic hit1, hit2;
  int checks = 0, failures = 0, cycles = 0, last_hit = -1, hits1 = 0, hits2 = 0;

  mod_counter #(.Mod(7)) dut1 (.clk_i(clk), .rst_ni(rst_n), .inc_i(1'b1),
                               .count_o(cnt1), .hit_o(hit1));
  mod_counter #(.Mod(8), .W(3), .ResetValue(1), .HitValue(0)) dut2 (
    .clk_i(clk), .rst_ni(rst_n), .inc_i(inc2), .count_o(cnt2), .hit_o(hit2));

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
      $display("FAIL %s at cycle %0d: cnt1=%0d hit1=%b cnt2=%0d hit2=%b",
               what, cycles, cnt1, hit1, cnt2, hit2);
    end
  endtask

  initial begin
    static int m1 = 0, m2 = 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (cycles = 0; cycles < 2000; cycles++) begin
      inc2 = ($urandom_range(2) == 0);
      #1;
      check("count1", cnt1 == 3'(m1));
      check("hit1", hit1 == (m1 == 6));
      check("count2", cnt2 == 3'(m2));
      check("hit2", hit2 == (inc2 && m2 == 0));
      if (hit1) begin
        hits1++;
        if (last_hit >= 0) check("hit1 spacing 7", cycles - last_hit == 7);
        last_hit = cycles;
      end
      if (hit2) hits2++;
      m1 = (m1 + 1) % 7;
      if (inc2) m2 = (m2 + 1) % 8;
      @(negedge clk);
    end
    check("hits seen", hits1 > 100 && hits2 > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
