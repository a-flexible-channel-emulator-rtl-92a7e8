// tb_ce_delay_out_router: checks the delay-output routing block of tap 5 in
// a full 32-port fabric (64 delay cells).  Random 64-bit masks are loaded
// as four 16-bit quarters per path over the control bus (types 5-8 and
// 9-12); words for other taps must be ignored.  For random delayed signals,
// data/violation/carrier must be the masked OR and timing the masked,
// carrier-prioritized selection, for both paths.
module tb_ce_delay_out_router;
  import ce_pkg::*;
  localparam int N = 32, M = 64;
  logic clk = 0, rst_n = 0;
  ctrl_bus_t cbus;
  sig_t dly [M];
  sig_t p1_rcv, p2_rcv;
  logic [M-1:0] m1, m2;
  int checks = 0, failures = 0;

  ce_delay_out_router #(.N(N), .INDEX(5)) dut (.*);
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

  function automatic sig_t model(logic [M-1:0] m);
    sig_t r;
    int w;
    r = '0;
    w = -1;
    for (int k = 0; k < M; k++)
      if (m[k]) begin
        r.data |= dly[k].data; r.viol |= dly[k].viol; r.carr |= dly[k].carr;
        if (dly[k].carr) w = k;
      end
    if (w < 0) for (int k = 0; k < M; k++) if (m[k]) w = k;
    r.tim = (w < 0) ? 1'b0 : dly[w].tim;
    return r;
  endfunction

  initial begin
    cbus = '0;
    foreach (dly[k]) dly[k] = '0;
    m1 = '0; m2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      // New masks: sparse, single-bit or dense.
      case (r % 3)
        0: begin m1 = 64'h1 << ($urandom % 64); m2 = 64'h1 << ($urandom % 64); end
        1: begin m1 = {$urandom, $urandom}; m2 = {$urandom, $urandom}; end
        default: begin m1 = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
                       m2 = {$urandom, $urandom} & {$urandom, $urandom}; end
      endcase
      for (int q = 0; q < 4; q++) begin
        send(4'(5 + q), 5'd5, m1[q*16 +: 16]);
        send(4'(9 + q), 5'd5, m2[q*16 +: 16]);
        send(4'(5 + q), 5'd4, 16'($urandom));   // another tap
        send(4'(9 + q), 5'd6, 16'($urandom));
      end
      for (int j = 0; j < 40; j++) begin
        foreach (dly[k]) begin
          dly[k] = sig_t'(4'($urandom));
          if ($urandom % 4 != 0) dly[k].carr = 1'b0;
          dly[k].data &= dly[k].carr;
          dly[k].viol &= dly[k].carr;
        end
        #1;
        checks++;
        if (p1_rcv !== model(m1) || p2_rcv !== model(m2)) begin
          failures++;
          $display("FAIL r=%0d got %b %b exp %b %b", r, p1_rcv, p2_rcv, model(m1), model(m2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
