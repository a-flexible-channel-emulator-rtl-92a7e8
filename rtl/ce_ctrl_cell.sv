// ce_ctrl_cell: control bus interface cell of one block.
//
// Every block watches the shared control bus.  This cell compares the
// block-type and block-index sub-busses with the block's own address and,
// when they match while the load sub-bus is high, copies the 16-bit value
// sub-bus into its configuration latch.  The latch output configures the
// block's programmable cells.  Because each cell picks its own words off the
// bus, the controller may send a configuration in any order.
//
// Timing: the latch is modelled as a register on clk; a word is taken on
// every clk edge at which load is high and the address matches, and appears
// at `value` after that edge.  The clocked strobe and the reset value are
// this design's choices (the original strobes a transparent latch).
module ce_ctrl_cell
  import ce_pkg::*;
#(
  parameter logic [VAL_W-1:0] RESET_VALUE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_bus_t         cbus,
  input  logic [TYPE_W-1:0] my_type,
  input  logic [IDX_W-1:0]  my_index,
  output logic              sel,      // address matches (for one-shot commands)
  output logic [VAL_W-1:0]  value
);
  assign sel = (cbus.btype == my_type) && (cbus.bindex == my_index);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               value <= RESET_VALUE;
    else if (sel && cbus.load) value <= cbus.value;
  end
endmodule
