// tb_ce_delay_cell: checks the delay cell with interpolator (16 steps) as
// programmed over the control bus.  For each setting, every output bit
// (taken at the rising edge of the output timing) must equal the input bit
// launched 2*(len+1)+1 clks earlier, plus one clk (half a bit period) with
// the interpolator bit set; the output timing must be the input timing one
// clk later, inverted when interpolating.  Words for other cells must be
// ignored, and an increment / decrement step word must move the delay by
// one bit period (two clks).  All 16 lengths are swept with and without
// the interpolator.
module tb_ce_delay_cell;
  import ce_pkg::*;
  localparam int DB = 4;
  logic clk = 0, rst_n = 0, ready;
  ctrl_bus_t cbus;
  sig_t din, dout;
  int checks = 0, failures = 0;

  ce_delay_cell #(.DELAY_BITS(DB), .MY_TYPE(BT_DLY_G2), .INDEX(9)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic send(logic [3:0] t, logic [4:0] i, logic [15:0] v);
    @(posedge clk); #2 cbus = cbus_word(t, i, v);
    @(posedge clk); #2 cbus.load = 0;
  endtask

  int cyc = 0;
  logic [2:0] in_at [int];
  logic prev_tout = 0, prev_tin = 0;
  int expect_d = -1, interp_now = 0, bad = 0, seen = 0;

  always @(posedge clk) begin
    #1;
    cyc++;
    prev_tin = din.tim;
    din.tim = ~din.tim;
    if (din.tim) begin
      {din.data, din.viol, din.carr} = 3'($urandom);
      in_at[cyc] = {din.data, din.viol, din.carr};
    end
  end

  // Monitor, sampled just after the register updates of each clk.
  always @(posedge clk) begin
    #2;
    if (expect_d >= 0) begin
      if (dout.tim !== (prev_tin ^ 1'(interp_now))) bad++;
      if (dout.tim && !prev_tout) begin
        seen++;
        if (in_at.exists(cyc - expect_d)) begin
          if ({dout.data, dout.viol, dout.carr} !== in_at[cyc - expect_d]) bad++;
        end else bad++;
      end
    end
    prev_tout = dout.tim;
  end

  task automatic run_check(int d, int interp, string what);
    repeat (2 * d + 10) @(posedge clk);
    bad = 0; seen = 0; expect_d = d; interp_now = interp;
    repeat (200) @(posedge clk);
    // Every compared output bit and timing sample counts as a check.
    checks += seen + 200;
    failures += bad;
    if (bad != 0 && failures < 20) $display("FAIL %s: %0d mismatches", what, bad);
    chk(seen >= 99, {what, ": output timing edges"});
    expect_d = -1;
  endtask

  initial begin
    cbus = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (ready);
    send(BT_DLY_G2, 5'd9, {5'd0, 10'd3, 1'b0});
    run_check(2 * 3 + 3, 0, "len 3");
    send(BT_DLY_G2, 5'd9, {5'd0, 10'd3, 1'b1});
    run_check(2 * 3 + 4, 1, "len 3 + interpolator");
    send(BT_DLY_G1, 5'd9, {5'd0, 10'd9, 1'b0});
    send(BT_DLY_G2, 5'd8, {5'd0, 10'd9, 1'b0});
    run_check(2 * 3 + 4, 1, "other cells' words ignored");
    send(BT_DLY_G2, 5'd9, {5'd0, 10'd0, 1'b0});
    run_check(3, 0, "len 0 (one bit period)");
    send(BT_DLY_G2, 5'd9, {5'd0, 10'd15, 1'b1});
    run_check(2 * 15 + 4, 1, "len 15 + interpolator");
    for (int l = 0; l < 16; l++)
      for (int ip = 0; ip < 2; ip++) begin
        send(BT_DLY_G2, 5'd9, {5'd0, 10'(l), 1'(ip)});
        run_check(2 * l + 3 + ip, ip, $sformatf("sweep len %0d interp %0d", l, ip));
      end
    send(BT_DLY_G2, 5'd9, {5'd0, 10'd7, 1'b0});
    send(BT_DLY_G2, 5'd9, 16'h1 << DLY_INC_BIT);
    run_check(2 * 8 + 3, 0, "increment step");
    send(BT_DLY_G2, 5'd9, 16'h1 << DLY_DEC_BIT);
    repeat (40) @(posedge clk);   // one pending step per direction
    send(BT_DLY_G2, 5'd9, 16'h1 << DLY_DEC_BIT);
    run_check(2 * 6 + 3, 0, "two decrement steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
