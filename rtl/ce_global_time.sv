// ce_global_time: global time reference.
//
// The 20 MHz global clock is broadcast to every node for synchronous
// operation and time stamps.  A GT_BITS-bit master counter runs on it; its
// most significant bit, a subharmonic of the clock, is broadcast too so
// that every node's own GT_BITS-bit time counter stays in step and its
// higher-order time bits advance once per master-counter wrap.  The width
// is this design's choice.  gt_sync rises once every 2^GT_BITS clks.
module ce_global_time #(
  parameter int unsigned GT_BITS = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [GT_BITS-1:0] gt_count,
  output logic               gt_sync
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gt_count <= '0;
    else        gt_count <= gt_count + 1'b1;
  end
  assign gt_sync = gt_count[GT_BITS-1];
endmodule
