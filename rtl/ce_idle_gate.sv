// ce_idle_gate: idle-forcing gate at a node's transmit leads.
//
// The fabric merges colliding signals with plain OR gates, which is only
// correct if a node's data and violation leads are low whenever its carrier
// is low.  For node equipment that does not guarantee this, two AND gates
// force data and violation to zero while the transmit carrier is low.
// Carrier and timing pass unchanged.  Purely combinational.
//
// The gate is the original's suggested circuit; putting it in every tap
// is this design's choice.
module ce_idle_gate
  import ce_pkg::*;
(
  input  sig_t xin,    // from node equipment
  output sig_t xout    // to the tap block
);
  always_comb begin
    xout      = xin;
    xout.data = xin.data & xin.carr;
    xout.viol = xin.viol & xin.carr;
  end
endmodule
