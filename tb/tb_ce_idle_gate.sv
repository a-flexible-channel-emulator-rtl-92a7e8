// tb_ce_idle_gate: exhaustive check of the idle-forcing gate: data and
// violation pass only while carrier is high; carrier and timing pass.
module tb_ce_idle_gate;
  import ce_pkg::*;
  sig_t xin, xout;
  int checks = 0, failures = 0;
  ce_idle_gate dut (.xin, .xout);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 16; k++) begin
      logic [3:0] v;
      v = 4'(k);
      xin = sig_t'(v);
      #1;
      checks++;
      if (xout.data !== (v[3] && v[1]) || xout.viol !== (v[2] && v[1]) ||
          xout.carr !== v[1] || xout.tim !== v[0]) begin
        failures++;
        $display("FAIL in=%b out=%b", v, xout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
