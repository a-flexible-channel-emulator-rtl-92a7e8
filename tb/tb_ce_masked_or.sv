// tb_ce_masked_or: random and corner-case check of the masked-OR cell
// (64 inputs): output = OR over the inputs whose mask bit is set.
module tb_ce_masked_or;
  localparam int M = 64;
  logic [M-1:0] sig_in, mask;
  logic sig_out;
  int checks = 0, failures = 0;
  ce_masked_or #(.M(M)) dut (.*);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic e;
      sig_in = {$urandom, $urandom};
      case (k % 3)
        0: mask = {$urandom, $urandom};
        1: mask = 64'h1 << ($urandom % 64);          // single path: selector
        default: mask = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      endcase
      if (k % 7 == 0) sig_in = 64'h1 << ($urandom % 64);
      e = 0;
      for (int i = 0; i < M; i++) if (mask[i] && sig_in[i]) e = 1;
      #1;
      checks++;
      if (sig_out !== e) begin failures++; $display("FAIL %h %h", sig_in, mask); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
