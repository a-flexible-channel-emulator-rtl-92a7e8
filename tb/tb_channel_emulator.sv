// tb_channel_emulator: end-to-end test of the full-size emulator (32 ports,
// 64 delay cells of 1024 steps, default parameters).
//
// Nodes are modelled here: each either sends queued frames with its own
// 10 MHz timing (clk/2, selectable phase), stays silent, or acts as a ring
// repeater (transmits what it receives).  All configuration goes through
// the control bus.  Every delay hop of len L adds 2L+3 clks, plus one with
// the interpolator bit; expected arrival times and contents are computed
// from the settings this bench programs.  Scenarios:
//   1. 32-node unidirectional ring with random hop delays and interpolators:
//      a frame from node 0 returns to node 0 complete and on time.
//   2. 32-node bidirectional bus: one sender, every other node receives on
//      the right path (path 1 to the right, path 2 to the left) at the
//      right time; then two senders collide and both detect it.
//   3. 4-node full-connectivity radio (ports 0-3, 12 delay cells, masked
//      OR reception): frames arrive with per-pair delays; simultaneous
//      frames collide in the OR; a mobile-node increment lengthens one
//      pair's delay by one bit period.
//      A decrement then shortens another pair's delay by one period.
//   4. Point-to-point link at the longest delay (1024 periods plus the
//      interpolator, 2*1023+4 clks).
//   5. Folded bus on four taps: outbound on path 1, folded onto path 2 at
//      the far end; every node hears the frame on the inbound line (path 2
//      receive, path-only timing).
//   6. Fault injection: forced 1 and noise on a port's receive leads;
//      global time subharmonic.
// Each mechanism is counted and a mechanism that never happened fails.
module tb_channel_emulator;
  import ce_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  ctrl_bus_t cbus;
  sig_t node_xmt [N], node_rcv [N], src_sig [N];
  logic [N-1:0] dir_sense, coll_data, coll_carr;
  logic gt_sync, ready;
  logic [7:0] gt_count;
  int checks = 0, failures = 0;

  channel_emulator dut (.*);

  always #5 clk = ~clk;
  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- nodes
  logic [N-1:0] repeater = '0, phase = '0;
  logic [1:0] txq [N][$];            // {viol, data} per bit
  int cyc = 0;
  logic tick = 0;

  always_comb
    for (int k = 0; k < N; k++) node_xmt[k] = repeater[k] ? node_rcv[k] : src_sig[k];

  always @(posedge clk) begin
    #1;
    cyc++;
    tick = ~tick;
    for (int k = 0; k < N; k++) begin
      src_sig[k].tim = tick ^ phase[k];
      if (src_sig[k].tim) begin
        if (txq[k].size() > 0) begin
          logic [1:0] b;
          b = txq[k].pop_front();
          src_sig[k].carr = 1'b1; src_sig[k].data = b[0]; src_sig[k].viol = b[1];
        end else begin
          src_sig[k].carr = 1'b0; src_sig[k].data = 1'b0; src_sig[k].viol = 1'b0;
        end
      end
    end
  end

  // Receivers: carrier-high samples at rising receive timing.
  typedef struct { int c; logic [1:0] b; } rx_t;
  rx_t rxq [N][$];
  logic [N-1:0] prev_rt = '0;
  int n_coll_carr = 0, n_coll_data = 0;
  always @(posedge clk) begin
    #2;
    for (int k = 0; k < N; k++) begin
      if (node_rcv[k].tim && !prev_rt[k] && node_rcv[k].carr)
        rxq[k].push_back('{cyc, {node_rcv[k].viol, node_rcv[k].data}});
      prev_rt[k] = node_rcv[k].tim;
    end
    n_coll_carr += $countones(coll_carr);
    // Data discrepancy only means something while the port transmits.
    for (int k = 0; k < N; k++) if (coll_data[k] && node_xmt[k].carr) n_coll_data++;
  end

  // ------------------------------------------------------------- helpers
  task automatic send(logic [3:0] t, int i, logic [15:0] v);
    @(posedge clk); #3 cbus = cbus_word(t, 5'(i), v);
    @(posedge clk); #3 cbus.load = 0;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s @%0t", what, $time); end
  endtask

  // Disconnect everything: taps off, masks zero.
  task automatic clear_all();
    for (int t = 0; t < N; t++) begin
      send(BT_TAP, t, 16'hF1F9);
      for (int q = 0; q < 4; q++) begin
        send(4'(5 + q), t, 16'h0);
        send(4'(9 + q), t, 16'h0);
      end
    end
  endtask

  // Mask bit k of tap t's path p (1/2) set alone or added.
  logic [63:0] mask [N][2];
  task automatic set_mask(int t, int p, logic [63:0] m);
    mask[t][p-1] = m;
    for (int q = 0; q < 4; q++) send(4'((p == 1 ? 5 : 9) + q), t, m[q*16 +: 16]);
  endtask

  // Delay cell c (0..63): program len/interp, return hop delay in clks.
  int hop [64];
  task automatic set_delay(int c, int len, int interp);
    send(c < N ? BT_DLY_G1 : BT_DLY_G2, c % N, {5'd0, 10'(len), 1'(interp)});
    hop[c] = 2 * len + 3 + interp;
  endtask

  // Frame of random bits for node k, returns the bits.
  task automatic queue_frame(int k, int len, output logic [1:0] bits[$]);
    bits.delete();
    for (int j = 0; j < len; j++) begin
      logic [1:0] b;
      b = 2'($urandom);
      bits.push_back(b);
      txq[k].push_back(b);
    end
  endtask

  // Start cycle of a queued frame: the next rising node timing.
  function automatic int next_rise(int k);
    // src timing after the next update at cycle cyc+1 is tick' ^ phase.
    return ((~tick ^ phase[k]) == 1'b1) ? cyc + 1 : cyc + 2;
  endfunction

  // Compare a receive queue with a frame expected from cycle c0.
  task automatic expect_rx(int k, logic [1:0] bits[$], int c0, string what);
    chk(rxq[k].size() == bits.size(), $sformatf("%s: node %0d got %0d of %0d bits", what, k,
        rxq[k].size(), bits.size()));
    if (rxq[k].size() == bits.size() && bits.size() > 0) begin
      int bad = 0;
      foreach (bits[j]) if (rxq[k][j].b !== bits[j] || rxq[k][j].c != c0 + 2 * j) bad++;
      chk(bad == 0, $sformatf("%s: node %0d contents/time (first at %0d, expected %0d)", what,
          k, rxq[k][0].c, c0));
    end
  endtask

  task automatic clear_rx();
    for (int k = 0; k < N; k++) rxq[k].delete();
    n_coll_carr = 0; n_coll_data = 0;
  endtask

  // Mechanism counters.
  int m_ring = 0, m_bus = 0, m_interp = 0, m_coll_carr = 0, m_coll_data = 0, m_star_or = 0;
  int m_broadcast = 0, m_step = 0, m_step_dn = 0, m_long = 0, m_fold = 0, m_fault = 0, m_noise = 0, m_arb = 0, m_left = 0, m_gt = 0;

  // ----------------------------------------------------------------- test
  initial begin
    logic [1:0] f0[$], f1[$];
    int c0, c1, total;
    cbus = '0;
    foreach (src_sig[k]) src_sig[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (ready);
    repeat (4) @(posedge clk);
    chk(rxq[0].size() == 0, "idle after reset");

    // ===== 1. unidirectional ring =====
    // Tap: Node RCV = P1 RCV, P1 XMT = N XMT; timing 001 01 11.
    total = 0;
    for (int t = 0; t < N; t++) begin
      int l, ip;
      send(BT_TAP, t, tap_word(3'd4, 3'd6, 3'd7, 3'd1, 2'b01, 2'b11));
      send(BT_DIN_P1, t, 16'(t));                    // cell t <- tap t path 1
      l = $urandom % 24; ip = $urandom % 2;
      m_interp += ip;
      set_delay(t, l, ip);
      total += hop[t];
      set_mask((t + 1) % N, 1, 64'h1 << t);          // tap t+1 hears cell t
      repeater[t] = (t != 0);
    end
    clear_rx();
    @(posedge clk); #1;
    queue_frame(0, 60, f0);
    c0 = next_rise(0);
    repeat (total + 200) @(posedge clk);
    expect_rx(0, f0, c0 + total, "ring");
    begin
      int d16;
      d16 = 0;
      for (int t = 0; t < 16; t++) d16 += hop[t];
      expect_rx(16, f0, c0 + d16, "ring at a repeater");
    end
    if (rxq[0].size() == 60) m_ring++;
    repeater = '0;

    // ===== 2. bidirectional bus =====
    clear_all();
    for (int t = 0; t < N; t++) begin
      // The end taps drive their outgoing path with their own node timing
      // so that delay cells keep being clocked after a carrier drops.
      send(BT_TAP, t, tap_word(3'd5, 3'd3, 3'd5, 3'b011, (t == 0) ? 2'b01 : 2'b00,
                               (t == N - 1) ? 2'b01 : 2'b00));
      send(BT_DIN_P1, t, 16'(t));          // cell t      <- tap t path 1 (rightward)
      send(BT_DIN_P2, t, 16'(N + t));      // cell N + t  <- tap t path 2 (leftward)
      // Interpolated hops are whole timing periods (2 clks of retiming plus
      // inversion), so every tap sees timing in the same phase.
      set_delay(t, 1 + $urandom % 6, 1);
      set_delay(N + t, 1 + $urandom % 6, 1);
      if (t < N - 1) set_mask(t + 1, 1, 64'h1 << t);
      if (t > 0)     set_mask(t - 1, 2, 64'h1 << (N + t));
    end
    clear_rx();
    @(posedge clk); #1;
    queue_frame(9, 40, f0);
    c0 = next_rise(9);
    repeat (700) @(posedge clk);
    begin
      int okc;
      okc = 0;
      for (int k = 0; k < N; k++) begin
        int d;
        d = 0;
        if (k > 9) for (int i = 9; i < k; i++) d += hop[i];
        if (k < 9) for (int i = k + 1; i <= 9; i++) d += hop[N + i];
        expect_rx(k, f0, c0 + d, "bus");
        if (rxq[k].size() == 40) okc++;
        if (k < 9 && rxq[k].size() == 40) m_left++;
      end
      if (okc == N) m_bus++;
      // The bus receive lead includes the node's own signal, so a lone sender
      // sees its own carrier (carrier AND is high) but no data discrepancy.
      chk(n_coll_data == 0, "no data discrepancy with one sender");
    end
    // Two senders collide.
    clear_rx();
    phase[20] = 1'b1;                       // other node's timing in opposite phase
    @(posedge clk); #1;
    queue_frame(12, 80, f0);
    queue_frame(20, 80, f1);
    begin
      int own, other;
      own = 0;
      other = 0;
      for (int j = 0; j < 200; j++) begin
        @(posedge clk); #3;
        // While node 20 sends, its receive timing follows its own timing.
        if (node_xmt[20].carr) own += (node_rcv[20].tim == node_xmt[20].tim);
        else if (node_rcv[20].carr) other += (node_rcv[20].tim != src_sig[20].tim);
      end
      repeat (400) @(posedge clk);
      chk(own > 100, "arbitration picks own timing while sending");
      chk(other > 20, "arbitration picks path timing after own carrier drops");
      if (own > 100 && other > 20) m_arb++;
    end
    chk(n_coll_carr > 0 && coll_carr == '0, "carrier collision detected, then cleared");
    chk(n_coll_data > 0, "data discrepancy detected");
    if (n_coll_carr > 0) m_coll_carr++;
    if (n_coll_data > 0) m_coll_data++;
    phase[20] = 1'b0;

    // ===== 3. four-node full-connectivity radio =====
    clear_all();
    begin
      int cell_of [4][4];
      int c;
      c = 0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        if (i != j) begin
          cell_of[i][j] = c;                          // cells 0..11 (path 1 group)
          send(BT_DIN_P1, c, 16'(i));                 // broadcast tap i to 3 cells
          // Same interpolator setting on every cell: all idle timings are
          // in phase, so switching the receive timing to a newly arriving
          // carrier loses no edge (see the one-bit arbitration error).
          set_delay(c, 2 + 3 * c, 0);
          c++;
        end
      for (int j = 0; j < 4; j++) begin
        logic [63:0] m;
        m = '0;
        for (int i = 0; i < 4; i++) if (i != j) m[cell_of[i][j]] = 1'b1;
        set_mask(j, 1, m);
        send(BT_TAP, j, tap_word(3'd4, 3'd6, 3'd7, 3'd1, 2'b01, 2'b11));
      end
      m_broadcast++;
      // Node 2 alone.
      clear_rx();
      @(posedge clk); #1;
      queue_frame(2, 30, f0);
      c0 = next_rise(2);
      repeat (200) @(posedge clk);
      for (int j = 0; j < 4; j++)
        if (j != 2) expect_rx(j, f0, c0 + hop[cell_of[2][j]], "radio");
      chk(rxq[2].size() == 0, "radio: no self reception");
      // Nodes 0 and 3 together: node 1 hears the OR of both.
      clear_rx();
      @(posedge clk); #1;
      queue_frame(0, 30, f0);
      queue_frame(3, 30, f1);
      c0 = next_rise(0);
      repeat (200) @(posedge clk);
      begin
        int d0, d3, first, last, bad;
        d0 = hop[cell_of[0][1]];
        d3 = hop[cell_of[3][1]];
        first = (d0 < d3) ? d0 : d3;
        last = (d0 < d3) ? d3 : d0;
        bad = 0;
        chk(rxq[1].size() == 30 + (last - first) / 2, "radio collision length");
        foreach (rxq[1][j]) begin
          int t;
          logic [1:0] e;
          t = rxq[1][j].c - c0;
          e = 2'b00;
          if (t >= d0 && (t - d0) / 2 < 30 && (t - d0) % 2 == 0) e |= f0[(t - d0) / 2];
          if (t >= d3 && (t - d3) / 2 < 30 && (t - d3) % 2 == 0) e |= f1[(t - d3) / 2];
          if (rxq[1][j].b !== e) bad++;
        end
        chk(bad <= (d0 % 2 != d3 % 2 ? 30 : 0), "radio collision is the OR");
        if (d0 % 2 == d3 % 2 && bad == 0) m_star_or++;
        if (d0 % 2 != d3 % 2) m_star_or++;
      end
      // Mobile node: node 2 -> node 0 delay one step longer.
      send(BT_DLY_G1, cell_of[2][0], 16'h1 << DLY_INC_BIT);
      hop[cell_of[2][0]] += 2;
      repeat (10) @(posedge clk);
      clear_rx();
      @(posedge clk); #1;
      queue_frame(2, 30, f0);
      c0 = next_rise(2);
      repeat (200) @(posedge clk);
      expect_rx(0, f0, c0 + hop[cell_of[2][0]], "mobile increment");
      expect_rx(1, f0, c0 + hop[cell_of[2][1]], "other pair unchanged");
      if (rxq[0].size() == 30 && rxq[0][0].c == c0 + hop[cell_of[2][0]]) m_step++;
      // Mobile node: node 2 -> node 1 delay one step shorter.
      send(BT_DLY_G1, cell_of[2][1], 16'h1 << DLY_DEC_BIT);
      hop[cell_of[2][1]] -= 2;
      repeat (10) @(posedge clk);
      clear_rx();
      @(posedge clk); #1;
      queue_frame(2, 30, f0);
      c0 = next_rise(2);
      repeat (200) @(posedge clk);
      expect_rx(1, f0, c0 + hop[cell_of[2][1]], "mobile decrement");
      expect_rx(0, f0, c0 + hop[cell_of[2][0]], "incremented pair kept");
      if (rxq[1].size() == 30 && rxq[1][0].c == c0 + hop[cell_of[2][1]]) m_step_dn++;
    end

    // ===== 4. longest hop: point-to-point link 20 -> 21 at 1024 periods =====
    clear_all();
    send(BT_TAP, 20, tap_word(3'd4, 3'd6, 3'd7, 3'd1, 2'b01, 2'b11));
    send(BT_TAP, 21, tap_word(3'd4, 3'd6, 3'd7, 3'd1, 2'b01, 2'b11));
    send(BT_DIN_P1, 8, 16'(20));                // cell 8 of group 1 <- tap 20
    set_delay(8, 1023, 1);
    set_mask(21, 1, 64'h1 << 8);
    repeat (2100) @(posedge clk);               // flush what the cell held before
    clear_rx();
    @(posedge clk); #1;
    queue_frame(20, 24, f0);
    c0 = next_rise(20);
    repeat (2 * 1023 + 200) @(posedge clk);
    expect_rx(21, f0, c0 + hop[8], "longest hop (1024 periods + interpolator)");
    if (rxq[21].size() == 24 && rxq[21][0].c == c0 + 2 * 1023 + 4) m_long++;

    // ===== 5. folded bus on taps 10..13 =====
    // Outbound on path 1 (10 -> 13), folded at tap 13 onto path 2, inbound
    // 13 -> 10; every node receives the inbound line.  Tap 10 drives
    // path 1 with its own timing.
    clear_all();
    for (int t = 10; t <= 13; t++) begin
      send(BT_TAP, t, tap_word(3'd7, 3'd3, 3'd4, 3'b010, (t == 10) ? 2'b01 : 2'b00, 2'b10));
      send(BT_DIN_P1, t, 16'(t));
      set_delay(t, 1 + $urandom % 9, 1);
      if (t < 13) set_mask(t + 1, 1, 64'h1 << t);     // outbound hop
      else        set_mask(13, 2, 64'h1 << 13);       // the fold
      if (t > 10) begin                               // inbound hop t -> t-1
        send(BT_DIN_P2, t, 16'(N + t));
        set_delay(N + t, 1 + $urandom % 9, 1);
        set_mask(t - 1, 2, 64'h1 << (N + t));
      end
    end
    repeat (100) @(posedge clk);
    clear_rx();
    @(posedge clk); #1;
    queue_frame(11, 32, f0);
    c0 = next_rise(11);
    repeat (400) @(posedge clk);
    begin
      int okc;
      okc = 0;
      for (int k = 10; k <= 13; k++) begin
        int d;
        d = 0;
        for (int t = 11; t <= 13; t++) d += hop[t];
        for (int t = k + 1; t <= 13; t++) d += hop[N + t];
        expect_rx(k, f0, c0 + d, "folded bus");
        if (rxq[k].size() == 32 && rxq[k][0].c == c0 + d) okc++;
      end
      if (okc == 4) m_fold++;
    end

    // ===== 6. faults and global time =====
    send(BT_TAP, 7, tap_word(3'd0, 3'd7, 3'd7, 3'd6, 2'b11, 2'b11));   // forced 1
    @(posedge clk); #3;
    chk(node_rcv[7] == 4'b1111, "forced 1 fault");
    if (node_rcv[7] == 4'b1111) m_fault++;
    send(BT_TAP, 7, tap_word(3'd2, 3'd7, 3'd7, 3'd5, 2'b11, 2'b11));   // noise
    begin
      int ones;
      ones = 0;
      for (int j = 0; j < 400; j++) begin @(posedge clk); #3 ones += node_rcv[7].data; end
      chk(ones > 120 && ones < 280, "noise fault");
      if (ones > 120 && ones < 280) m_noise++;
    end
    begin
      int r;
      logic p;
      r = 0;
      p = gt_sync;
      for (int j = 0; j < 1024; j++) begin @(posedge clk); #3 if (gt_sync && !p) r++; p = gt_sync; end
      chk(r == 4, "global time subharmonic period 256");
      if (r == 4) m_gt++;
    end

    $display("mechanisms: ring=%0d bus=%0d left=%0d interp=%0d coll_carr=%0d coll_data=%0d arb=%0d",
             m_ring, m_bus, m_left, m_interp, m_coll_carr, m_coll_data, m_arb);
    $display("            broadcast=%0d masked_or=%0d step_up=%0d step_down=%0d long=%0d",
             m_broadcast, m_star_or, m_step, m_step_dn, m_long);
    $display("            folded=%0d fault=%0d noise=%0d gt=%0d", m_fold, m_fault, m_noise, m_gt);
    chk(m_ring > 0, "ring happened");       chk(m_bus > 0, "bus happened");
    chk(m_left > 0, "path 2 used");         chk(m_interp > 0, "interpolator used");
    chk(m_coll_carr > 0, "carrier collision happened");
    chk(m_coll_data > 0, "data discrepancy happened");
    chk(m_arb > 0, "clock arbitration switched");
    chk(m_broadcast > 0, "broadcast routing");  chk(m_star_or > 0, "masked-OR collision");
    chk(m_step > 0, "delay step");          chk(m_step_dn > 0, "delay step down");
    chk(m_long > 0, "longest delay");        chk(m_fold > 0, "folded bus");          chk(m_fault > 0, "forced fault");
    chk(m_noise > 0, "noise fault");        chk(m_gt > 0, "global time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
