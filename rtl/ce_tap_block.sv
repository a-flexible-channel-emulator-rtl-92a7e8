// ce_tap_block: tap block, the link between one node port and the fabric.
//
// A tap sits between a node's interface leads and the two fabric paths.
// Data, violation and carrier each pass through an identical topology/fault
// cell (ce_topo_cell) sharing one 9-bit setting; timing passes through the
// timing cell with its clock arbitrators (7 bits).  The 16-bit word comes
// from the tap's control bus cell (block type 0, index INDEX).  Transmit
// leads first pass the idle-forcing gate so that data and violation are low
// while the carrier is low, which keeps every OR-type collision point
// correct.  Two noise sources feed the fault inputs, and the collision
// detection cell compares what the node sends with what it receives.
//
// Timing: everything from node or path inputs to outputs is combinational;
// only the configuration word and the noise sources are registered.  The
// reset configuration disconnects the port (all outputs forced to 0).
//
// The cell structure follows the original; the bit layout of the word, the
// reset value and the noise wiring are this design's choices.
module ce_tap_block
  import ce_pkg::*;
#(
  parameter int unsigned INDEX = 0,
  parameter logic [14:0] SEED1 = 15'h1234,
  parameter logic [14:0] SEED2 = 15'h4321
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ctrl_bus_t cbus,
  input  sig_t      node_xmt,    // from the node
  output sig_t      node_rcv,    // to the node
  input  sig_t      p1_rcv,      // from the delay-output routing block
  input  sig_t      p2_rcv,
  output sig_t      p1_xmt,      // to the delay-input routing blocks
  output sig_t      p2_xmt,
  output logic      dir_sense,   // carrier directional sense
  output logic      coll_data,   // data discrepancy
  output logic      coll_carr    // carrier collision
);
  // Disconnected: Node RCV = 0, paths = 0, timing outputs = 0.
  localparam logic [VAL_W-1:0] TAP_RESET = 16'hF1F9;

  logic [VAL_W-1:0] word;
  tap_cfg_t cfg;
  sig_t nx;
  logic prbn1, prbn2;
  logic unused_sel, dir_d, dir_v;

  ce_ctrl_cell #(.RESET_VALUE(TAP_RESET)) u_ctrl (
    .clk, .rst_n, .cbus, .my_type(BT_TAP), .my_index(IDX_W'(INDEX)),
    .sel(unused_sel), .value(word));
  assign cfg = tap_cfg_t'(word);

  ce_idle_gate u_idle (.xin(node_xmt), .xout(nx));

  ce_prbn #(.SEED(SEED1)) u_prbn1 (.clk, .rst_n, .noise(prbn1));
  ce_prbn #(.SEED(SEED2)) u_prbn2 (.clk, .rst_n, .noise(prbn2));

  ce_topo_cell u_data (.cfg(cfg.dvc), .n_xmt(nx.data), .p1_rcv(p1_rcv.data), .p2_rcv(p2_rcv.data),
                       .prbn1, .prbn2, .n_rcv(node_rcv.data), .p1_xmt(p1_xmt.data),
                       .p2_xmt(p2_xmt.data), .dir_sense(dir_d));
  ce_topo_cell u_viol (.cfg(cfg.dvc), .n_xmt(nx.viol), .p1_rcv(p1_rcv.viol), .p2_rcv(p2_rcv.viol),
                       .prbn1, .prbn2, .n_rcv(node_rcv.viol), .p1_xmt(p1_xmt.viol),
                       .p2_xmt(p2_xmt.viol), .dir_sense(dir_v));
  ce_topo_cell u_carr (.cfg(cfg.dvc), .n_xmt(nx.carr), .p1_rcv(p1_rcv.carr), .p2_rcv(p2_rcv.carr),
                       .prbn1, .prbn2, .n_rcv(node_rcv.carr), .p1_xmt(p1_xmt.carr),
                       .p2_xmt(p2_xmt.carr), .dir_sense(dir_sense));

  ce_timing_cell u_tim (.cfg(cfg.tim), .n_xmt(nx), .p1_rcv, .p2_rcv, .prbn(prbn1),
                        .n_rcv_tim(node_rcv.tim), .p1_xmt_tim(p1_xmt.tim),
                        .p2_xmt_tim(p2_xmt.tim));

  ce_coll_detect u_coll (.n_xmt(nx), .n_rcv(node_rcv), .coll_data, .coll_carr);
endmodule
