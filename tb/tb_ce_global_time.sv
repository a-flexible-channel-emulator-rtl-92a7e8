// tb_ce_global_time: checks the master time counter counts every clk and
// that its subharmonic output has period 2^GT_BITS clks, high for half.
module tb_ce_global_time;
  localparam int GB = 5;
  logic clk = 0, rst_n = 0, gt_sync;
  logic [GB-1:0] gt_count;
  int checks = 0, failures = 0;
  ce_global_time #(.GT_BITS(GB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int rises = 0, last_rise = -1, highs = 0;
    logic prev = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 640; c++) begin
      checks++;
      if (gt_count !== GB'(c)) begin failures++; $display("FAIL count %0d", c); end
      if (gt_sync && !prev) begin
        if (last_rise >= 0) begin
          checks++;
          if (c - last_rise != 32) begin failures++; $display("FAIL period"); end
        end
        last_rise = c; rises++;
      end
      highs += gt_sync;
      prev = gt_sync;
      @(posedge clk); #1;
    end
    checks++;
    if (highs != 320 || rises != 20) begin failures++; $display("FAIL duty %0d %0d", highs, rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
