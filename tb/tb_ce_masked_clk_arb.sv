// tb_ce_masked_clk_arb: checks the masked clock arbitrator (64 inputs):
// the timing of the highest-numbered masked input with its carrier high is
// passed; with no such carrier, that of the highest-numbered masked input;
// with an empty mask, 0.
module tb_ce_masked_clk_arb;
  localparam int M = 64;
  logic [M-1:0] carr_in, tim_in, mask;
  logic tim_out;
  int checks = 0, failures = 0;
  ce_masked_clk_arb #(.M(M)) dut (.*);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic e;
      int w;
      carr_in = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      tim_in = {$urandom, $urandom};
      case (k % 4)
        0: mask = {$urandom, $urandom};
        1: mask = 64'h1 << ($urandom % 64);
        2: mask = '0;
        default: mask = {$urandom, $urandom} & {$urandom, $urandom};
      endcase
      if (k % 5 == 0) carr_in = '0;
      w = -1;
      for (int i = 0; i < M; i++) if (mask[i] && carr_in[i]) w = i;
      if (w < 0) for (int i = 0; i < M; i++) if (mask[i]) w = i;
      e = (w < 0) ? 1'b0 : tim_in[w];
      #1;
      checks++;
      if (tim_out !== e) begin failures++; $display("FAIL k=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
