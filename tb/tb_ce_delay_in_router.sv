// tb_ce_delay_in_router: for a 4-port fabric (8 sources), programs random
// path 1 / path 2 selections into routing block 2 through the control bus
// and checks that each output follows the selected source (broadcast of one
// source to both outputs included) and that other blocks' words are ignored.
module tb_ce_delay_in_router;
  import ce_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  ctrl_bus_t cbus;
  sig_t src [2*N];
  sig_t to_p1, to_p2;
  int checks = 0, failures = 0;
  int s1 = 0, s2 = 0;

  ce_delay_in_router #(.N(N), .INDEX(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [3:0] t, logic [4:0] idx, logic [15:0] v);
    cbus = cbus_word(t, idx, v);
    @(posedge clk); #1;
    cbus.load = 0;
  endtask

  initial begin
    cbus = '0;
    foreach (src[i]) src[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int r;
      r = $urandom % 4;
      if (r == 0) begin s1 = $urandom % (2*N); send(BT_DIN_P1, 5'd2, 16'(s1)); end
      if (r == 1) begin s2 = $urandom % (2*N); send(BT_DIN_P2, 5'd2, 16'(s2)); end
      if (r == 2) send(BT_DIN_P1, 5'd1, 16'($urandom % (2*N)));
      if (r == 3) send(BT_DIN_P2, 5'd3, 16'($urandom % (2*N)));
      for (int j = 0; j < 8; j++) begin
        foreach (src[i]) src[i] = sig_t'(4'($urandom));
        #1;
        checks++;
        if (to_p1 !== src[s1] || to_p2 !== src[s2]) begin
          failures++;
          $display("FAIL sel %0d/%0d got %b/%b", s1, s2, to_p1, to_p2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
