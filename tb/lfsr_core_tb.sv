// lfsr_core_tb: self-checking test of the switched-tap shift register.
//
// Part 1: with presets idle, each tap position run alone from every nonzero
// state must return to that state after exactly 7 clocks, passing 7 distinct
// states (maximal length), and state 000 must be left towards 100 with an
// output of 1 (zero escape). Part 2: random tap positions, presets and
// clears are compared cycle by cycle with a reference model written from
// the gate description: D0 = out | prt0, Di = Q(i-1) | prt_i, each cleared
// when its clear is low; out = (Q2 xor tap) or (Q == 000), tap = Q0 for t1,
// Q1 for t2. Part 3 repeats part 2 on a second instance with AsyncClear = 1,
// where a stage whose clear is low reads as 0 within the cycle.
module lfsr_core_tb;
  import prbs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tap_sel_e tap_sel = TAP_T2;
  logic [2:0] prt = '0, clr_n = '1, q;
  logic prbs;
  int checks = 0, failures = 0, cycles = 0;

  lfsr_core dut (.clk_i(clk), .rst_ni(rst_n), .tap_sel_i(tap_sel),
                 .prt_i(prt), .clr_ni(clr_n), .q_o(q), .prbs_o(prbs));

  logic [2:0] qa;
  logic prbs_a;
  lfsr_core #(.AsyncClear(1'b1)) dut_async (
    .clk_i(clk), .rst_ni(rst_n), .tap_sel_i(tap_sel),
    .prt_i(prt), .clr_ni(clr_n), .q_o(qa), .prbs_o(prbs_a));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_out(logic [2:0] s, tap_sel_e t);
    logic tap = (t == TAP_T1) ? s[0] : s[1];
    return (s[2] ^ tap) | (s == 3'b000);
  endfunction

  function automatic logic [2:0] ref_next(logic [2:0] s, tap_sel_e t,
                                          logic [2:0] p, logic [2:0] c);
    logic [2:0] n = {s[1], s[0], ref_out(s, t)} | p;
    return n & c;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d: q=%b prbs=%b", what, cycles, q, prbs);
    end
  endtask

  // Load a value through the preset/clear path (one clock).
  task automatic load(logic [2:0] v);
    @(negedge clk);
    prt = v; clr_n = v;
    @(negedge clk);
    prt = '0; clr_n = '1;
    check("load", q == v);
  endtask

  initial begin
    logic [2:0] exp_q;
    logic       seen [8];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset state", q == 3'b000);

    // Zero escape.
    check("zero escape out", prbs == 1'b1);
    @(negedge clk);
    check("zero escape next", q == 3'b001);

    // Maximal length for both taps from every nonzero state.
    for (int t = 0; t < 2; t++) begin
      tap_sel = tap_sel_e'(t);
      for (int s = 1; s < 8; s++) begin
        load(3'(s));
        foreach (seen[k]) seen[k] = 1'b0;
        for (int k = 0; k < 7; k++) begin
          check("no zero state", q != 3'b000);
          check("distinct state", !seen[q]);
          seen[q] = 1'b1;
          @(negedge clk);
        end
        check("period 7", q == 3'(s));
      end
    end

    // Random cycle-by-cycle comparison.
    exp_q = q;
    for (int k = 0; k < 3000; k++) begin
      tap_sel = tap_sel_e'($urandom_range(1));
      if ($urandom_range(3) == 0) begin
        prt = 3'($urandom); clr_n = 3'($urandom);
      end else begin
        prt = '0; clr_n = '1;
      end
      #1;
      check("output", prbs == ref_out(exp_q, tap_sel));
      exp_q = ref_next(exp_q, tap_sel, prt, clr_n);
      @(negedge clk);
      check("state", q == exp_q);
    end

    // Random comparison of the AsyncClear variant: the register content r
    // is seen as r & clr_n during the cycle.
    begin
      logic [2:0] r;
      @(negedge clk);
      prt = '0; clr_n = '1;
      #1;
      r = qa;
      for (int k = 0; k < 3000; k++) begin
        logic [2:0] seen_q;
        tap_sel = tap_sel_e'($urandom_range(1));
        if ($urandom_range(3) == 0) begin
          prt = 3'($urandom); clr_n = 3'($urandom);
        end else begin
          prt = '0; clr_n = '1;
        end
        #1;
        seen_q = r & clr_n;
        check("async: stage outputs", qa == seen_q);
        check("async: output", prbs_a == ref_out(seen_q, tap_sel));
        r = ref_next(seen_q, tap_sel, prt, clr_n);
        @(negedge clk);
        prt = '0; clr_n = '1;
        #1;
        check("async: state", qa == r);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
