// tb_ce_timing_cell: checks the timing topology cell against every row of
// the per-topology timing table, with the node carrier high and low, and
// then checks the arbitrated receive selections (IC3 / IC4) and fault codes
// against an independent model for all carrier/timing combinations.
module tb_ce_timing_cell;
  import ce_pkg::*;
  tim_cfg_t cfg;
  sig_t n_xmt, p1_rcv, p2_rcv;
  logic prbn, n_rcv_tim, p1_xmt_tim, p2_xmt_tim;
  int checks = 0, failures = 0;

  ce_timing_cell dut (.*);

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sources: 0 gnd, 1 N XMT, 2 P1 RCV, 3 P2 RCV, 4 arbitrated receive
  function automatic logic src(int e, logic nt, logic t1, logic t2, logic arb);
    case (e) 0: return 0; 1: return nt; 2: return t1; 3: return t2; default: return arb; endcase
  endfunction

  typedef struct { string name; logic [6:0] addr; int r_hi, r_lo, a_hi, a_lo, b_hi, b_lo; } row_t;
  row_t rows[12];

  initial begin
    //                          7-bit      RCV hi/lo  P1 hi/lo  P2 hi/lo
    rows[0]  = '{"BB",       7'b011_00_00, 1, 4,      1, 2,     1, 3};
    rows[1]  = '{"UR/CRR",   7'b001_01_11, 2, 2,      1, 1,     0, 0};
    rows[2]  = '{"FB",       7'b010_00_10, 3, 3,      1, 2,     3, 3};
    rows[3]  = '{"EAST CFR", 7'b001_11_01, 2, 2,      0, 0,     1, 1};
    rows[4]  = '{"WEST CFR", 7'b010_01_11, 3, 3,      1, 1,     0, 0};
    rows[5]  = '{"UBP NODE", 7'b010_00_10, 3, 3,      1, 2,     3, 3};
    rows[6]  = '{"UBP HEAD", 7'b001_11_01, 2, 2,      0, 0,     1, 1};
    rows[7]  = '{"S NODE",   7'b010_01_11, 3, 3,      1, 1,     0, 0};
    rows[8]  = '{"S HEAD",   7'b001_11_01, 2, 2,      0, 0,     1, 1};
    rows[9]  = '{"R",        7'b001_01_11, 2, 2,      1, 1,     0, 0};
    rows[10] = '{"PP",       7'b001_01_11, 2, 2,      1, 1,     0, 0};
    rows[11] = '{"PT",       7'b001_01_10, 2, 2,      1, 1,     3, 3};
    prbn = 0;
    n_xmt = '0; p1_rcv = '0; p2_rcv = '0;
    foreach (rows[r]) begin
      cfg = tim_cfg_t'(tap_word(3'b0, 3'b0, 3'b0, rows[r].addr[6:4], rows[r].addr[3:2],
                                rows[r].addr[1:0]) >> 9);
      for (int k = 0; k < 64; k++) begin
        logic [5:0] v;
        logic nc, arb, er, e1, e2;
        v = 6'(k);
        {n_xmt.carr, n_xmt.tim, p1_rcv.tim, p2_rcv.tim, p1_rcv.carr, p2_rcv.carr} = v;
        nc = n_xmt.carr;
        // Arbitrated receive timing (bus): node when transmitting, else the
        // side whose carrier is present, path 1 by default.
        arb = (p2_rcv.carr && !p1_rcv.carr) ? p2_rcv.tim : p1_rcv.tim;
        er = src(nc ? rows[r].r_hi : rows[r].r_lo, n_xmt.tim, p1_rcv.tim, p2_rcv.tim, arb);
        e1 = src(nc ? rows[r].a_hi : rows[r].a_lo, n_xmt.tim, p1_rcv.tim, p2_rcv.tim, arb);
        e2 = src(nc ? rows[r].b_hi : rows[r].b_lo, n_xmt.tim, p1_rcv.tim, p2_rcv.tim, arb);
        #1;
        checks++;
        if (n_rcv_tim !== er || p1_xmt_tim !== e1 || p2_xmt_tim !== e2) begin
          failures++;
          $display("FAIL %s in=%b out=%b%b%b exp=%b%b%b", rows[r].name, v,
                   n_rcv_tim, p1_xmt_tim, p2_xmt_tim, er, e1, e2);
        end
      end
    end
    // Remaining receive codes: IC4 (path 2 suppressed), noise, forced 1/0.
    for (int s = 0; s < 8; s++)
      for (int k = 0; k < 128; k++) begin
        logic [6:0] v;
        logic e;
        v = 7'(k);
        {n_xmt.carr, n_xmt.tim, p1_rcv.tim, p2_rcv.tim, p1_rcv.carr, p2_rcv.carr, prbn} = v;
        cfg.rcv_sel = 3'(s); cfg.p1_mode = 2'b11; cfg.p2_mode = 2'b11;
        case (s)
          1: e = p1_rcv.tim;
          2: e = p2_rcv.tim;
          3: e = n_xmt.carr ? n_xmt.tim : ((p2_rcv.carr && !p1_rcv.carr) ? p2_rcv.tim : p1_rcv.tim);
          4: e = n_xmt.carr ? n_xmt.tim : p1_rcv.tim;
          5: e = prbn;
          6: e = 1;
          default: e = 0;
        endcase
        #1;
        checks++;
        if (n_rcv_tim !== e || p1_xmt_tim !== 0 || p2_xmt_tim !== 0) begin
          failures++;
          $display("FAIL code %0d in=%b", s, v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
