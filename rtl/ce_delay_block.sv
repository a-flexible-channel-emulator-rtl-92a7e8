// ce_delay_block: delay block INDEX, two identical delay cells.
//
// The path 1 cell is programmed as delay group 1 (block type 3) and the
// path 2 cell as delay group 2 (block type 4), both at index INDEX.  Each
// delays the signals chosen for it by the delay-input routing block.
// Timing as in ce_delay_cell.
//
// Two cells per block and their group numbering follow the original
// address plan.
module ce_delay_block
  import ce_pkg::*;
#(
  parameter int unsigned DELAY_BITS = DELAY_BITS_DEFAULT,
  parameter int unsigned INDEX = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ctrl_bus_t cbus,
  input  sig_t      din_p1,
  input  sig_t      din_p2,
  output sig_t      dout_p1,
  output sig_t      dout_p2,
  output logic      ready
);
  logic rdy1, rdy2;
  ce_delay_cell #(.DELAY_BITS(DELAY_BITS), .MY_TYPE(BT_DLY_G1), .INDEX(INDEX)) u_p1 (
    .clk, .rst_n, .cbus, .din(din_p1), .dout(dout_p1), .ready(rdy1));
  ce_delay_cell #(.DELAY_BITS(DELAY_BITS), .MY_TYPE(BT_DLY_G2), .INDEX(INDEX)) u_p2 (
    .clk, .rst_n, .cbus, .din(din_p2), .dout(dout_p2), .ready(rdy2));
  assign ready = rdy1 & rdy2;
endmodule
