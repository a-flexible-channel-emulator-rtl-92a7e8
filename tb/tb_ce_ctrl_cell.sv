// tb_ce_ctrl_cell: checks the control bus cell's address decode and latch.
// Words sent to other types or indices must be ignored; a matching word
// with load high must appear one clk later; load low must change nothing.
module tb_ce_ctrl_cell;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_bus_t cbus;
  logic sel;
  logic [15:0] value, expect_v;
  int checks = 0, failures = 0;

  ce_ctrl_cell #(.RESET_VALUE(16'hA5A5)) dut (.clk, .rst_n, .cbus, .my_type(4'd5),
                                             .my_index(5'd17), .sel, .value);
  always #5 clk = ~clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [3:0] t, logic [4:0] i, logic [15:0] v, logic ld);
    cbus = '{btype: t, bindex: i, value: v, load: ld};
    @(posedge clk); #1;
    cbus.load = 0;
  endtask

  task automatic check(string what);
    checks++;
    if (value !== expect_v) begin
      failures++;
      $display("FAIL %s: value=%h expected %h", what, value, expect_v);
    end
  endtask

  initial begin
    cbus = '0;
    repeat (2) @(posedge clk);
    #1 expect_v = 16'hA5A5; check("reset");
    rst_n = 1;
    send(4'd5, 5'd17, 16'h1234, 1); expect_v = 16'h1234; check("match");
    send(4'd5, 5'd16, 16'hFFFF, 1); check("other index");
    send(4'd6, 5'd17, 16'hFFFF, 1); check("other type");
    send(4'd5, 5'd17, 16'hBEEF, 0); check("no load");
    for (int k = 0; k < 200; k++) begin
      logic [3:0] t; logic [4:0] i; logic [15:0] v;
      t = ($urandom % 3 == 0) ? 4'd5 : 4'($urandom);
      i = ($urandom % 3 == 0) ? 5'd17 : 5'($urandom);
      v = 16'($urandom);
      send(t, i, v, 1);
      if (t == 4'd5 && i == 5'd17) expect_v = v;
      check("random");
    end
    cbus = '{btype: 4'd5, bindex: 5'd17, value: 16'h0, load: 1'b0};
    #1 checks++; if (!sel) begin failures++; $display("FAIL sel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
