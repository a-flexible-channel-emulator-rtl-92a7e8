// channel_emulator: programmable physical-layer channel emulator.
//
// N node ports are joined by a programmable fabric instead of a real
// medium.  Each port's tap block turns the node's transmit signals and the
// two fabric paths into Path 1 / Path 2 transmit signals and the node's
// receive signals.  The 2N tap outputs enter a 2N x 2N crossbar (the N
// delay-input routing blocks), each crossbar output passes a programmable
// delay cell (N delay blocks of two cells), and the N delay-output routing
// blocks mask and OR the delayed signals back onto each tap's two path
// inputs.  In matrix form: outputs = B * D * A * inputs, with A a crossbar
// (one 1 per row), D the diagonal of delays and B the masks.
//
// Everything is configured through one 26-bit control bus (ctrl_bus_t):
// block type, block index, value, load.  Node signals are synchronous to
// clk, the 20 MHz global clock; the usual 10 MHz node timing toggles every
// clk.  Tap and routing logic is combinational, every delay cell retimes
// its outputs, so each loop through the fabric contains registers.  After
// reset the delay cells clear their RAMs for 2^DELAY_BITS clks
// (`ready` low); all ports start disconnected.
//
// Structure, sizes (32 ports, 64 cells of 1024 steps) and addressing follow
// the original; the single-clock timing model and the register stage in
// every delay cell are this design's choices.
module channel_emulator
  import ce_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,                 // node ports
  parameter int unsigned DELAY_BITS = DELAY_BITS_DEFAULT, // RAM delay steps = 2^DELAY_BITS
  parameter int unsigned GT_BITS = 8                    // global master counter
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ctrl_bus_t          cbus,
  input  sig_t               node_xmt [N],
  output sig_t               node_rcv [N],
  output logic [N-1:0]       dir_sense,
  output logic [N-1:0]       coll_data,
  output logic [N-1:0]       coll_carr,
  output logic               gt_sync,
  output logic [GT_BITS-1:0] gt_count,
  output logic               ready
);
  localparam int unsigned M = 2 * N;

  sig_t tap_out [M];    // [t] = tap t Path 1 XMT, [N+t] = tap t Path 2 XMT
  sig_t dly_in  [M];    // [i] = path 1 cell of delay block i, [N+i] = path 2 cell
  sig_t dly_out [M];
  sig_t p1_rcv [N], p2_rcv [N];
  logic [N-1:0] blk_ready;

  for (genvar i = 0; i < N; i++) begin : g_node
    ce_tap_block #(
      .INDEX(i),
      .SEED1(15'h1234 ^ 15'(i * 977)),
      .SEED2(15'h4321 ^ 15'(i * 331))
    ) u_tap (
      .clk, .rst_n, .cbus,
      .node_xmt(node_xmt[i]), .node_rcv(node_rcv[i]),
      .p1_rcv(p1_rcv[i]), .p2_rcv(p2_rcv[i]),
      .p1_xmt(tap_out[i]), .p2_xmt(tap_out[N+i]),
      .dir_sense(dir_sense[i]), .coll_data(coll_data[i]), .coll_carr(coll_carr[i]));

    ce_delay_in_router #(.N(N), .INDEX(i)) u_din (
      .clk, .rst_n, .cbus, .src(tap_out), .to_p1(dly_in[i]), .to_p2(dly_in[N+i]));

    ce_delay_block #(.DELAY_BITS(DELAY_BITS), .INDEX(i)) u_dly (
      .clk, .rst_n, .cbus, .din_p1(dly_in[i]), .din_p2(dly_in[N+i]),
      .dout_p1(dly_out[i]), .dout_p2(dly_out[N+i]), .ready(blk_ready[i]));

    ce_delay_out_router #(.N(N), .INDEX(i)) u_dout (
      .clk, .rst_n, .cbus, .dly(dly_out), .p1_rcv(p1_rcv[i]), .p2_rcv(p2_rcv[i]));
  end

  ce_global_time #(.GT_BITS(GT_BITS)) u_gt (.clk, .rst_n, .gt_count, .gt_sync);

  assign ready = &blk_ready;
endmodule
