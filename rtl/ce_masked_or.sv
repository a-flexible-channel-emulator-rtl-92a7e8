// ce_masked_or: masked-OR cell of the delay-output routing block.
//
// An AND-gate mask keeps only the delayed signals that belong to the local
// topology of the receiving tap, and an OR merges what is left.  With one
// mask bit set the cell is a plain selector; with several (star, radio,
// passive tree) the OR is the collision point.  Combinational.
//
// Follows the original cell as described: mask, then OR.
module ce_masked_or #(
  parameter int unsigned M = 64
) (
  input  logic [M-1:0] sig_in,
  input  logic [M-1:0] mask,
  output logic         sig_out
);
  assign sig_out = |(sig_in & mask);
endmodule
