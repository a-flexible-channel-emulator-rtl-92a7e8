// tb_ce_delay_block: checks that the two cells of a delay block are
// addressed separately (group 1 = path 1, group 2 = path 2) and delay their
// own streams: path 1 len 2 without interpolation (7 clks), path 2 len 5
// with interpolation (14 clks), then the settings swapped.
module tb_ce_delay_block;
  import ce_pkg::*;
  localparam int DB = 4;
  logic clk = 0, rst_n = 0, ready;
  ctrl_bus_t cbus;
  sig_t din_p1, din_p2, dout_p1, dout_p2;
  int checks = 0, failures = 0;

  ce_delay_block #(.DELAY_BITS(DB), .INDEX(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [3:0] t, logic [4:0] i, logic [15:0] v);
    @(posedge clk); #2 cbus = cbus_word(t, i, v);
    @(posedge clk); #2 cbus.load = 0;
  endtask

  int cyc = 0;
  logic [2:0] a_at [int], b_at [int];
  logic pa = 0, pb = 0;
  int da = -1, db = -1, bad = 0, seen = 0;

  always @(posedge clk) begin
    #1;
    cyc++;
    din_p1.tim = ~din_p1.tim;
    din_p2.tim = din_p1.tim;
    if (din_p1.tim) begin
      {din_p1.data, din_p1.viol, din_p1.carr} = 3'($urandom);
      {din_p2.data, din_p2.viol, din_p2.carr} = 3'($urandom);
      a_at[cyc] = {din_p1.data, din_p1.viol, din_p1.carr};
      b_at[cyc] = {din_p2.data, din_p2.viol, din_p2.carr};
    end
  end

  always @(posedge clk) begin
    #2;
    if (da >= 0 && dout_p1.tim && !pa) begin
      seen++;
      if (!a_at.exists(cyc - da) || {dout_p1.data, dout_p1.viol, dout_p1.carr} !== a_at[cyc - da]) bad++;
    end
    if (db >= 0 && dout_p2.tim && !pb) begin
      seen++;
      if (!b_at.exists(cyc - db) || {dout_p2.data, dout_p2.viol, dout_p2.carr} !== b_at[cyc - db]) bad++;
    end
    pa = dout_p1.tim; pb = dout_p2.tim;
  end

  task automatic run_check(int d1, int d2, string what);
    repeat (60) @(posedge clk);
    bad = 0; seen = 0; da = d1; db = d2;
    repeat (200) @(posedge clk);
    // Every compared output bit counts as a check, plus one for the count.
    checks += seen + 1;
    failures += bad + ((seen < 198) ? 1 : 0);
    if (bad != 0 || seen < 198) $display("FAIL %s bad=%0d seen=%0d", what, bad, seen);
    da = -1; db = -1;
  endtask

  initial begin
    cbus = '0; din_p1 = '0; din_p2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (ready);
    send(BT_DLY_G1, 5'd3, {5'd0, 10'd2, 1'b0});
    send(BT_DLY_G2, 5'd3, {5'd0, 10'd5, 1'b1});
    run_check(7, 14, "separate settings");
    send(BT_DLY_G1, 5'd3, {5'd0, 10'd5, 1'b1});
    send(BT_DLY_G2, 5'd3, {5'd0, 10'd2, 1'b0});
    run_check(14, 7, "swapped settings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
