// tb_ce_tap_block: programs a tap through the control bus and checks it.
// After reset the port must be disconnected.  A word addressed to another
// tap must be ignored.  Bidirectional-bus setting: data, violation and
// carrier follow the bus OR expressions, timing follows the arbitration,
// collision outputs and direction sense respond; node data is forced low
// while its carrier is low.  Then the forced-1 and noise fault settings.
module tb_ce_tap_block;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_bus_t cbus;
  sig_t node_xmt, node_rcv, p1_rcv, p2_rcv, p1_xmt, p2_xmt;
  logic dir_sense, coll_data, coll_carr;
  int checks = 0, failures = 0;

  ce_tap_block #(.INDEX(6)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [4:0] idx, logic [15:0] v);
    cbus = cbus_word(BT_TAP, idx, v);
    @(posedge clk); #1;
    cbus.load = 0;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    cbus = '0; node_xmt = '0; p1_rcv = '0; p2_rcv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Disconnected after reset, whatever arrives.
    for (int k = 0; k < 64; k++) begin
      {node_xmt, p1_rcv[3:2]} = 6'(k); p2_rcv = sig_t'(4'(k));
      #1 chk(node_rcv == '0 && p1_xmt == '0 && p2_xmt == '0, "reset disconnected");
    end
    // Bus setting sent to another tap: still disconnected.
    send(5'd7, tap_word(3'd5, 3'd3, 3'd5, 3'b011, 2'b00, 2'b00));
    node_xmt = 4'b1111; #1 chk(p1_xmt == '0, "other index ignored");
    // Bidirectional bus.
    send(5'd6, tap_word(3'd5, 3'd3, 3'd5, 3'b011, 2'b00, 2'b00));
    for (int k = 0; k < 4096; k++) begin
      logic [11:0] v;
      sig_t nx;
      logic d, vi, c, t1, t2, tr;
      v = 12'($urandom);
      node_xmt = sig_t'(v[11:8]); p1_rcv = sig_t'(v[7:4]); p2_rcv = sig_t'(v[3:0]);
      nx = node_xmt;
      nx.data = nx.data & nx.carr;
      nx.viol = nx.viol & nx.carr;
      d  = p1_rcv.data | p2_rcv.data | nx.data;
      vi = p1_rcv.viol | p2_rcv.viol | nx.viol;
      c  = p1_rcv.carr | p2_rcv.carr | nx.carr;
      t1 = nx.carr ? nx.tim : p1_rcv.tim;
      t2 = nx.carr ? nx.tim : p2_rcv.tim;
      tr = nx.carr ? nx.tim : ((p2_rcv.carr && !p1_rcv.carr) ? p2_rcv.tim : p1_rcv.tim);
      #1;
      chk(node_rcv.data == d && node_rcv.viol == vi && node_rcv.carr == c, "bus rcv");
      chk(node_rcv.tim == tr, "bus rcv timing");
      chk(p1_xmt.data == (p1_rcv.data | nx.data) && p1_xmt.carr == (p1_rcv.carr | nx.carr)
          && p1_xmt.viol == (p1_rcv.viol | nx.viol), "bus p1 xmt");
      chk(p2_xmt.data == (p2_rcv.data | nx.data) && p2_xmt.carr == (p2_rcv.carr | nx.carr),
          "bus p2 xmt");
      chk(p1_xmt.tim == t1 && p2_xmt.tim == t2, "bus xmt timing");
      chk(coll_data == ((nx.data ^ d) | (nx.viol ^ vi)), "coll data");
      chk(coll_carr == (nx.carr & c), "coll carr");
      chk(dir_sense == p2_rcv.carr, "dir sense");
    end
    // Fault: forced 1 on Node RCV, noise on Path 2 XMT, forced 0 on Path 1.
    send(5'd6, tap_word(3'd0, 3'd7, 3'd1, 3'd6, 2'b11, 2'b11));
    begin
      int ones = 0;
      for (int k = 0; k < 200; k++) begin
        #1 chk(node_rcv.data && node_rcv.carr && node_rcv.tim && p1_xmt == '0, "forced");
        ones += p2_xmt.data;
        chk(p2_xmt.data == p2_xmt.carr, "noise shared by the three copies");
        @(posedge clk);
      end
      chk(ones > 50 && ones < 150, "noise toggles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
