// tb_ce_coll_detect: exhaustive check of data-discrepancy and carrier
// collision detection.
module tb_ce_coll_detect;
  import ce_pkg::*;
  sig_t n_xmt, n_rcv;
  logic coll_data, coll_carr;
  int checks = 0, failures = 0;
  ce_coll_detect dut (.*);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 256; k++) begin
      logic [7:0] v;
      v = 8'(k);
      n_xmt = sig_t'(v[7:4]);
      n_rcv = sig_t'(v[3:0]);
      #1;
      checks++;
      if (coll_data !== ((v[7] != v[3]) || (v[6] != v[2])) ||
          coll_carr !== (v[5] && v[1])) begin
        failures++;
        $display("FAIL %b -> %b %b", v, coll_data, coll_carr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
