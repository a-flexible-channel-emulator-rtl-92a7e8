// tb_ce_prbn: checks the noise source against a reference LFSR computed
// with integer arithmetic, its period (2^15-1) and its balance.
module tb_ce_prbn;
  logic clk = 0, rst_n = 0, noise;
  int checks = 0, failures = 0;
  ce_prbn #(.SEED(15'h2A5C)) dut (.clk, .rst_n, .noise);
  always #5 clk = ~clk;
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int unsigned st, ones, first_repeat;
    st = 32'h2A5C;
    ones = 0; first_repeat = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 32767 * 2; k++) begin
      checks++;
      if (noise !== st[14]) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d", k);
      end
      if (k < 32767) ones += noise;
      st = ((st << 1) | (((st >> 14) ^ (st >> 13)) & 1)) & 32'h7FFF;
      if (k < 32766 && st == 32'h2A5C) first_repeat = k + 1;
      @(posedge clk); #1;
    end
    checks++;
    if (ones != 16384) begin failures++; $display("FAIL ones=%0d", ones); end
    checks++;
    if (first_repeat != 0) begin failures++; $display("FAIL short period %0d", first_repeat); end
    checks++;
    if (st != 32'h2A5C) begin failures++; $display("FAIL period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
