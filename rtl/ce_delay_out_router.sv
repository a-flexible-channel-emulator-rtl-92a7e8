// ce_delay_out_router: delay-output routing block of tap INDEX.
//
// This block decides which delayed signals reach the tap's Path 1 RCV and
// Path 2 RCV inputs.  Each path has an M-bit mask (M = 2N delay cells)
// shared by three masked-OR cells (data, violation, carrier) and one masked
// clock arbitrator (timing).  Single-bit masks give the point-to-point links
// used for buses and rings; multi-bit masks build collision stars and
// full-connectivity radio networks, where every node has its own private OR
// of the other nodes' delayed signals.
//
// The masks arrive in 16-bit words: path 1 word q at block type 5+q, path 2
// word q at block type 9+q (four quarters at the default size; a smaller
// fabric uses only the first ceil(M/16) of them), index INDEX.  The 5-bit
// index sub-bus limits N to 32.  Mask bit k selects delay cell k:
// k < N is the path 1 cell of delay block k, N+k the path 2 cell of block k
// (this numbering is this design's choice).  Reset clears the masks.
// Routing is combinational; the mask words are registered.
module ce_delay_out_router
  import ce_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned INDEX = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ctrl_bus_t cbus,
  input  sig_t      dly [2*N],   // delay cell outputs
  output sig_t      p1_rcv,
  output sig_t      p2_rcv
);
  localparam int unsigned M = 2 * N;
  localparam int unsigned Q = (M + VAL_W - 1) / VAL_W;

  if (N > 32 || N < 1) begin : g_bad_n
    $error("ce_delay_out_router: N must be 1..32");
  end

  logic [Q*VAL_W-1:0] mask_w [2];
  logic [M-1:0] mask [2];
  logic [M-1:0] d_v, v_v, c_v, t_v;
  sig_t rcv [2];

  for (genvar p = 0; p < 2; p++) begin : g_path
    for (genvar q = 0; q < Q; q++) begin : g_quarter
      logic unused_sel;
      ce_ctrl_cell u_ctrl (.clk, .rst_n, .cbus,
                           .my_type(TYPE_W'((p == 0 ? int'(BT_DOUT_P1) : int'(BT_DOUT_P2)) + q)),
                           .my_index(IDX_W'(INDEX)), .sel(unused_sel),
                           .value(mask_w[p][q*VAL_W +: VAL_W]));
    end
    assign mask[p] = mask_w[p][M-1:0];

    ce_masked_or #(.M(M)) u_data (.sig_in(d_v), .mask(mask[p]), .sig_out(rcv[p].data));
    ce_masked_or #(.M(M)) u_viol (.sig_in(v_v), .mask(mask[p]), .sig_out(rcv[p].viol));
    ce_masked_or #(.M(M)) u_carr (.sig_in(c_v), .mask(mask[p]), .sig_out(rcv[p].carr));
    ce_masked_clk_arb #(.M(M)) u_tim (.carr_in(c_v), .tim_in(t_v), .mask(mask[p]),
                                      .tim_out(rcv[p].tim));
  end

  always_comb
    for (int k = 0; k < int'(M); k++) begin
      d_v[k] = dly[k].data;
      v_v[k] = dly[k].viol;
      c_v[k] = dly[k].carr;
      t_v[k] = dly[k].tim;
    end

  assign p1_rcv = rcv[0];
  assign p2_rcv = rcv[1];
endmodule
