// ce_coll_detect: optional collision detection cell of a tap.
//
// Data discrepancy: the XOR of transmitted and received data, ORed with the
// XOR of transmitted and received violation; a 1 means what the node hears
// differs from what it sends (bidirectional-bus style detection).  Carrier
// collision: the AND of transmitted and received carrier; a 1 means another
// carrier is active while the node transmits.  Combinational.
//
// Both gates are those of the original cell; the outputs are left
// unregistered by this design's choice.
module ce_coll_detect
  import ce_pkg::*;
(
  input  sig_t n_xmt,
  input  sig_t n_rcv,
  output logic coll_data,
  output logic coll_carr
);
  assign coll_data = (n_xmt.data ^ n_rcv.data) | (n_xmt.viol ^ n_rcv.viol);
  assign coll_carr = n_xmt.carr & n_rcv.carr;
endmodule
