// tb_ce_clk_arb: exhaustive check of the transmit clock arbitrator for the
// four (A1, A2) settings: arbitrate, node only, path only, zero.
module tb_ce_clk_arb;
  logic [1:0] mode;
  logic n_carr, n_tim, p_tim, tim_out;
  int checks = 0, failures = 0;
  ce_clk_arb dut (.*);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a1 = 0; a1 < 2; a1++)
      for (int a2 = 0; a2 < 2; a2++)
        for (int k = 0; k < 8; k++) begin
          logic e;
          mode = {1'(a2), 1'(a1)};
          {n_carr, n_tim, p_tim} = 3'(k);
          if (a1 == 0 && a2 == 0) e = n_carr ? n_tim : p_tim;
          else if (a1 == 0) e = n_tim;
          else if (a2 == 0) e = p_tim;
          else e = 0;
          #1;
          checks++;
          if (tim_out !== e) begin
            failures++;
            $display("FAIL A1=%0d A2=%0d in=%b out=%b", a1, a2, 3'(k), tim_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
