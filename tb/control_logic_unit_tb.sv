// control_logic_unit_tb: exhaustive check of the preset/clear gates.
//
// For all 16 combinations of Hit and B2..B0: with Hit low no preset is
// active and no clear is active (all !CLR high); with Hit high the preset
// bits equal B and the active-low clears equal B, so applying both to a
// register loads B whatever it held.
module control_logic_unit_tb;

  logic hit;
  logic [2:0] b, prt, clr_n;
  int checks = 0, failures = 0;

  control_logic_unit dut (.hit_i(hit), .b_i(b), .prt_o(prt), .clr_no(clr_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 2; h++) begin
      for (int v = 0; v < 8; v++) begin
        hit = h[0]; b = 3'(v);
        #1;
        for (int i = 0; i < 3; i++) begin
          automatic logic exp_prt = h[0] && v[i];
          automatic logic exp_clr = !h[0] || v[i];
          checks++;
          if (prt[i] !== exp_prt || clr_n[i] !== exp_clr) begin
            failures++;
            $display("FAIL hit=%0d B=%03b bit %0d: prt=%b clr_n=%b", h, v, i, prt, clr_n);
          end
        end
        // Effect on any register content r: ((r | prt) & clr_n).
        for (int r = 0; r < 8; r++) begin
          automatic logic [2:0] after = (3'(r) | prt) & clr_n;
          checks++;
          if (after != (h[0] ? 3'(v) : 3'(r))) begin
            failures++;
            $display("FAIL load hit=%0d B=%03b r=%03b -> %03b", h, v, r, after);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
