// ce_clk_arb: transmit clock arbitrator for one fabric path.
//
// An asynchronous tap must forward a well-defined timing signal with the
// data it sends onward.  When the local node is transmitting (its carrier
// is high) the node's own timing is used; otherwise the timing arriving on
// the path from the preceding block is passed on.  During a collision this
// defaults to the local source, an approximation that costs at most one bit
// period of phase error.  Two configuration bits (A1, A2) select:
//   (0,0) arbitrate, (0,1) node timing only, (1,0) path timing only
//   ("feedback"), (1,1) logic 0.
// The node carrier acts as the selector's A0 line.  Combinational.
module ce_clk_arb
  import ce_pkg::*;
(
  input  logic [1:0] mode,     // {A2, A1}
  input  logic       n_carr,   // node XMT carrier
  input  logic       n_tim,    // node XMT timing
  input  logic       p_tim,    // path RCV timing
  output logic       tim_out
);
  always_comb begin
    unique case (arb_mode_e'(mode))
      ARB_BOTH: tim_out = n_carr ? n_tim : p_tim;
      ARB_NODE: tim_out = n_tim;
      ARB_PATH: tim_out = p_tim;
      default:  tim_out = 1'b0;
    endcase
  end
endmodule
