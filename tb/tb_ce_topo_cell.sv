// tb_ce_topo_cell: checks the data/violation/carrier topology cell.
// Part 1: every row of the per-topology settings table (bus, ring, folded
// bus, counter-rotating ring recovery, bus pair, star, radio, point-to-
// point, passive tree) is applied with every input combination and the
// outputs compared with the Boolean expressions the table lists.
// Part 2: every selector code is compared with an independent decode of
// the schematic's selector inputs, including the forced 1/0 and noise
// fault inputs.
module tb_ce_topo_cell;
  import ce_pkg::*;
  dvc_cfg_t cfg;
  logic n_xmt, p1_rcv, p2_rcv, prbn1, prbn2, n_rcv, p1_xmt, p2_xmt, dir_sense;
  int checks = 0, failures = 0;

  ce_topo_cell dut (.*);

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expressions: 0 gnd, 1 N, 2 P1, 3 P2, 4 P1+N, 5 P2+N, 6 P1+P2+N
  function automatic logic expr(int e, logic n, logic a, logic b);
    case (e)
      0: return 1'b0;
      1: return n;
      2: return a;
      3: return b;
      4: return a | n;
      5: return b | n;
      default: return a | b | n;
    endcase
  endfunction

  typedef struct { string name; logic [8:0] addr; int e_rcv, e_p1, e_p2; } row_t;
  row_t rows[12];

  initial begin
    rows[0]  = '{"BB",        9'b101_011_101, 6, 4, 5};
    rows[1]  = '{"UR/CRR",    9'b100_110_111, 2, 1, 0};
    rows[2]  = '{"FB",        9'b111_011_100, 3, 4, 3};
    rows[3]  = '{"EAST CFR",  9'b100_111_110, 2, 0, 1};
    rows[4]  = '{"WEST CFR",  9'b111_110_111, 3, 1, 0};
    rows[5]  = '{"UBP NODE",  9'b111_011_100, 3, 4, 3};
    rows[6]  = '{"UBP HEAD",  9'b100_111_110, 2, 0, 1};
    rows[7]  = '{"S NODE",    9'b111_110_111, 3, 1, 0};
    rows[8]  = '{"S HEAD",    9'b100_111_110, 2, 0, 1};
    rows[9]  = '{"R",         9'b100_110_111, 2, 1, 0};
    rows[10] = '{"PP",        9'b100_110_111, 2, 1, 0};
    rows[11] = '{"PT",        9'b100_110_100, 2, 1, 3};
    prbn1 = 0; prbn2 = 0;
    foreach (rows[r]) begin
      cfg.rcv_sel = rows[r].addr[8:6];
      cfg.p1_sel  = rows[r].addr[5:3];
      cfg.p2_sel  = rows[r].addr[2:0];
      for (int k = 0; k < 8; k++) begin
        {n_xmt, p1_rcv, p2_rcv} = 3'(k);
        #1;
        checks++;
        if (n_rcv !== expr(rows[r].e_rcv, n_xmt, p1_rcv, p2_rcv) ||
            p1_xmt !== expr(rows[r].e_p1, n_xmt, p1_rcv, p2_rcv) ||
            p2_xmt !== expr(rows[r].e_p2, n_xmt, p1_rcv, p2_rcv)) begin
          failures++;
          $display("FAIL %s in=%b out=%b%b%b", rows[r].name, 3'(k), n_rcv, p1_xmt, p2_xmt);
        end
        checks++;
        if (dir_sense !== p2_rcv) begin failures++; $display("FAIL dir"); end
      end
    end
    // Part 2: all codes, all inputs.
    for (int s = 0; s < 8; s++)
      for (int k = 0; k < 32; k++) begin
        logic er, e1, e2;
        logic [4:0] v;
        v = 5'(k);
        {n_xmt, p1_rcv, p2_rcv, prbn1, prbn2} = v;
        cfg.rcv_sel = 3'(s); cfg.p1_sel = 3'(s); cfg.p2_sel = 3'(s);
        case (s)
          0: er = 1; 1: er = 0; 2: er = prbn1; 3: er = prbn2; 4: er = p1_rcv;
          5: er = p1_rcv | p2_rcv | n_xmt; 6: er = p1_rcv | n_xmt; default: er = p2_rcv;
        endcase
        case (s)
          0: begin e1 = 1; e2 = 1; end
          1: begin e1 = prbn2; e2 = prbn1; end
          2: begin e1 = p1_rcv; e2 = p1_rcv; end
          3: begin e1 = p1_rcv | n_xmt; e2 = e1; end
          4: begin e1 = p2_rcv; e2 = p2_rcv; end
          5: begin e1 = p2_rcv | n_xmt; e2 = e1; end
          6: begin e1 = n_xmt; e2 = n_xmt; end
          default: begin e1 = 0; e2 = 0; end
        endcase
        #1;
        checks++;
        if (n_rcv !== er || p1_xmt !== e1 || p2_xmt !== e2) begin
          failures++;
          $display("FAIL code %0d in=%b out=%b%b%b", s, v, n_rcv, p1_xmt, p2_xmt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
