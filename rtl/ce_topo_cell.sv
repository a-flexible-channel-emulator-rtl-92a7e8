// ce_topo_cell: topology/fault cell for one of data, violation or carrier.
//
// Three 8:1 selectors with three OR gates derive the signals a tap hands
// to the node (Node RCV) and to the two fabric paths (Path 1 XMT, Path 2
// XMT) from what the node sends (Node XMT) and what arrives on the paths
// (Path 1 RCV, Path 2 RCV).  Choosing OR combinations realizes bus, ring,
// folded bus, star, radio, point-to-point and passive-tree taps; the forced
// 1, forced 0 and noise inputs inject faults.  Selector inputs:
//
//   Node RCV  : 0 one, 1 zero, 2 PRBN1, 3 PRBN2, 4 P1, 5 P1|P2|N, 6 P1|N, 7 P2
//   Path XMT  : 0 one, 1 PRBN (path 2: PRBN1, path 1: PRBN2), 2 P1, 3 P1|N,
//               4 P2, 5 P2|N, 6 N, 7 zero
//
// The input wiring follows the original cell schematic, and the original
// per-topology settings (e.g. bidirectional bus = Node 5, Path 1 3, Path 2
// 5) select the intended functions.  Direction sense (used for the carrier copy only) is
// the Path 2 RCV signal, as wired in the schematic.  Combinational.
module ce_topo_cell
  import ce_pkg::*;
(
  input  dvc_cfg_t cfg,
  input  logic     n_xmt,
  input  logic     p1_rcv,
  input  logic     p2_rcv,
  input  logic     prbn1,
  input  logic     prbn2,
  output logic     n_rcv,
  output logic     p1_xmt,
  output logic     p2_xmt,
  output logic     dir_sense
);
  logic p1_or_n, p2_or_n, all_or;
  assign p1_or_n = p1_rcv | n_xmt;
  assign p2_or_n = p2_rcv | n_xmt;
  assign all_or  = p1_or_n | p2_rcv;

  function automatic logic xmt_mux(logic [2:0] s, logic noise, logic p1, logic p1n,
                                   logic p2, logic p2n, logic n);
    unique case (s)
      3'd0: return 1'b1;
      3'd1: return noise;
      3'd2: return p1;
      3'd3: return p1n;
      3'd4: return p2;
      3'd5: return p2n;
      3'd6: return n;
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    unique case (cfg.rcv_sel)
      3'd0: n_rcv = 1'b1;
      3'd1: n_rcv = 1'b0;
      3'd2: n_rcv = prbn1;
      3'd3: n_rcv = prbn2;
      3'd4: n_rcv = p1_rcv;
      3'd5: n_rcv = all_or;
      3'd6: n_rcv = p1_or_n;
      default: n_rcv = p2_rcv;
    endcase
    p2_xmt = xmt_mux(cfg.p2_sel, prbn1, p1_rcv, p1_or_n, p2_rcv, p2_or_n, n_xmt);
    p1_xmt = xmt_mux(cfg.p1_sel, prbn2, p1_rcv, p1_or_n, p2_rcv, p2_or_n, n_xmt);
  end

  assign dir_sense = p2_rcv;
endmodule
