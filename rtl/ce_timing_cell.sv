// ce_timing_cell: topology/fault cell for the timing signal.
//
// Five selector functions derive the three timing outputs of a tap:
//   IC1 / IC2: Path 1 / Path 2 XMT timing, each a clock arbitrator between
//              node timing and that path's received timing (ce_clk_arb).
//   IC3:       arbitrated receive timing: node timing while the node's
//              carrier is high, else the timing of the path whose carrier is
//              high (path 1 when both are, and when neither is).
//   IC4:       as IC3 with path 2 suppressed, so path 2 can serve as a
//              feedback path.
//   IC5:       Node RCV timing selector.
// 7-bit configuration: IC5 address {A2,A1,A0} and the (A1,A2) pairs of IC1
// and IC2.  IC5 codes 1 (Path 1 RCV), 2 (Path 2 RCV) and 3 (IC3) follow
// the original settings; code 4 (IC4), 5 (noise), 6 (forced 1) and 0/7
// (forced 0) are this design's assignment of the remaining inputs, as are
// the IC3 defaults.  Combinational.
module ce_timing_cell
  import ce_pkg::*;
(
  input  tim_cfg_t cfg,
  input  sig_t     n_xmt,
  input  sig_t     p1_rcv,
  input  sig_t     p2_rcv,
  input  logic     prbn,
  output logic     n_rcv_tim,
  output logic     p1_xmt_tim,
  output logic     p2_xmt_tim
);
  logic ic3, ic4;

  ce_clk_arb u_ic1 (.mode(cfg.p1_mode), .n_carr(n_xmt.carr), .n_tim(n_xmt.tim),
                    .p_tim(p1_rcv.tim), .tim_out(p1_xmt_tim));
  ce_clk_arb u_ic2 (.mode(cfg.p2_mode), .n_carr(n_xmt.carr), .n_tim(n_xmt.tim),
                    .p_tim(p2_rcv.tim), .tim_out(p2_xmt_tim));

  always_comb begin
    // IC3: address lines driven by node, path 1 and path 2 carriers.
    if (n_xmt.carr)                      ic3 = n_xmt.tim;
    else if (p2_rcv.carr && !p1_rcv.carr) ic3 = p2_rcv.tim;
    else                                  ic3 = p1_rcv.tim;
    // IC4: path 2 suppressed.
    ic4 = n_xmt.carr ? n_xmt.tim : p1_rcv.tim;
    // IC5.
    unique case (cfg.rcv_sel)
      3'd1: n_rcv_tim = p1_rcv.tim;
      3'd2: n_rcv_tim = p2_rcv.tim;
      3'd3: n_rcv_tim = ic3;
      3'd4: n_rcv_tim = ic4;
      3'd5: n_rcv_tim = prbn;
      3'd6: n_rcv_tim = 1'b1;
      default: n_rcv_tim = 1'b0;
    endcase
  end
endmodule
