// tb_ce_ram_delay: checks the RAM delay cell at 16 steps (DELAY_BITS=4).
// Phase A: random 3-bit stream, timing period 2 clks, len 5 -> every
// output bit equals the input bit 6 periods earlier.  Phase B: timing
// period 4 clks, len 15 (maximum) -> 16 periods.  Phase C: packets with
// idle gaps; an increment request during a packet must lengthen the delay
// by one period from the next gap on, two decrements shorten it by two,
// and the carrier-high samples must come out complete and in order.  The
// clearing sweep after reset must take 16 clks and output idle.
module tb_ce_ram_delay;
  localparam int DB = 4;
  logic clk = 0, rst_n = 0;
  logic init = 0, inc_req = 0, dec_req = 0, tim = 0, tim_out, ready;
  logic [DB-1:0] len = '0;
  logic [2:0] din = '0, dout;
  int checks = 0, failures = 0;

  ce_ram_delay #(.DELAY_BITS(DB)) dut (.*);
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

  // Recorded streams.
  logic [2:0] ins[$], outs[$];
  logic tprev = 0;
  int half = 1;        // timing half period in clks
  int phase_cnt = 0;
  logic running = 0;
  // Stimulus source: returns the next input sample.
  logic [2:0] pk_q[$];

  always @(posedge clk) begin
    #1;
    if (running) begin
      phase_cnt++;
      if (phase_cnt >= half) begin
        phase_cnt = 0;
        tim = ~tim;
        if (tim) begin
          din = pk_q.size() ? pk_q.pop_front() : 3'b000;
          ins.push_back(din);
        end
      end
    end
    if (tim_out && !tprev) outs.push_back(dout);

    tprev = tim_out;
  end

  task automatic load_len(int l);
    @(posedge clk); #2 len = DB'(l); init = 1;
    @(posedge clk); #2 init = 0;
  endtask

  // Delay of stream alignment: find d with outs[k] == ins[k-d] for the
  // recorded window, return the number of mismatches for a given d.
  function automatic int mism(int d, int from, int to);
    int m = 0;
    for (int k = from; k < to; k++)
      if (k - d >= 0 && outs[k] !== ins[k - d]) m++;
    return m;
  endfunction

  initial begin
    int clr;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    clr = 0;
    while (!ready) begin @(posedge clk); #1 clr++; chk(dout == 0, "idle while clearing"); end
    chk(clr == 16, "clearing sweep length");
    // Phase A.
    load_len(5);
    for (int k = 0; k < 300; k++) pk_q.push_back(3'($urandom));
    ins.delete(); outs.delete();
    running = 1;
    repeat (620) @(posedge clk);
    for (int k = 0; k < 290; k++)
      chk(outs[k] === ((k >= 6) ? ins[k - 6] : 3'b000), "phase A delay 6");
    // Phase B: slower timing, maximum length.
    half = 2;
    load_len(15);
    for (int k = 0; k < 200; k++) pk_q.push_back(3'($urandom));
    ins.delete(); outs.delete();
    repeat (860) @(posedge clk);
    chk(mism(16, 40, 200) == 0, "phase B delay 16");
    chk(mism(15, 40, 200) > 20, "phase B not 15");
    // Phase C: packets, steps.
    half = 1;
    load_len(4);
    pk_q.delete();
    repeat (40) @(posedge clk);
    ins.delete(); outs.delete();
    for (int p = 0; p < 40; p++) begin
      int l, g;
      l = 3 + $urandom % 8;
      g = 3 + $urandom % 5;
      for (int k = 0; k < l; k++) pk_q.push_back({2'($urandom), 1'b1});
      for (int k = 0; k < g; k++) pk_q.push_back(3'b000);
    end
    // Increment requested in the middle of traffic, then two decrements.
    repeat (200) @(posedge clk);
    #2 inc_req = 1; @(posedge clk); #2 inc_req = 0;
    repeat (250) @(posedge clk);
    #2 dec_req = 1; @(posedge clk); #2 dec_req = 0;
    repeat (100) @(posedge clk);
    #2 dec_req = 1; @(posedge clk); #2 dec_req = 0;
    while (pk_q.size()) @(posedge clk);
    repeat (60) @(posedge clk);
    begin
      // Carrier-high samples must match one for one.
      logic [2:0] a[$], b[$];
      int ds[$];
      int last_in = -1, pk_in[$], pk_out[$];
      foreach (ins[k]) if (ins[k][0]) a.push_back(ins[k]);
      foreach (outs[k]) if (outs[k][0]) b.push_back(outs[k]);
      chk(a.size() == b.size(), "no sample lost or repeated");
      foreach (a[k]) if (k < b.size()) chk(a[k] == b[k], "packet contents");
      // Packet start delays.
      foreach (ins[k]) if (ins[k][0] && (k == 0 || !ins[k-1][0])) pk_in.push_back(k);
      foreach (outs[k]) if (outs[k][0] && (k == 0 || !outs[k-1][0])) pk_out.push_back(k);
      chk(pk_in.size() == pk_out.size() && pk_in.size() == 40, "packet count");
      foreach (pk_in[k]) if (k < pk_out.size()) ds.push_back(pk_out[k] - pk_in[k]);
      // Expected: 5 at first, then 6 after the increment, then 5, then 4.
      chk(ds[0] == 5, "initial delay 5");
      chk(ds[ds.size()-1] == 4, "final delay 4 after two decrements");
      begin
        int seen6 = 0, bad = 0;
        foreach (ds[k]) begin
          if (ds[k] == 6) seen6 = 1;
          if (ds[k] < 4 || ds[k] > 6) bad++;
          if (k > 0 && (ds[k] - ds[k-1] > 1 || ds[k-1] - ds[k] > 1)) bad++;
        end
        chk(seen6 == 1, "increment applied");
        chk(bad == 0, "delay steps by one period at a time");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
