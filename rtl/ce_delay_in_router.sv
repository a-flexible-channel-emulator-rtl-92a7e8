// ce_delay_in_router: delay-input routing block of one delay block.
//
// Together the N routing blocks form a unidirectional 2N x 2N crossbar,
// stacked four deep for data, violation, carrier and timing.  Block INDEX
// holds two 4-wire 2N:1 selectors: the path 1 selector feeds the path 1
// delay cell of delay block INDEX, the path 2 selector its path 2 cell.
// Each selection is a log2(2N)-bit number in the low bits of the value
// sub-bus, loaded with block type 1 (path 1) or 2 (path 2).  Because any
// number of selectors may pick the same source, broadcast is free.
//
// Source numbering (this design's choice): code s < N selects Path 1 XMT of
// tap s, code N+s selects Path 2 XMT of tap s.  Reset selects code 0.
// Selection is combinational; the selection words are registered.
module ce_delay_in_router
  import ce_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned INDEX = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ctrl_bus_t cbus,
  input  sig_t      src [2*N],   // tap outputs, numbered as above
  output sig_t      to_p1,       // to the path 1 delay cell
  output sig_t      to_p2        // to the path 2 delay cell
);
  localparam int unsigned SEL_W = (2*N > 1) ? $clog2(2*N) : 1;

  logic [VAL_W-1:0] w1, w2;
  logic s1_unused, s2_unused;
  logic [SEL_W-1:0] sel1, sel2;

  ce_ctrl_cell u_ctrl1 (.clk, .rst_n, .cbus, .my_type(BT_DIN_P1), .my_index(IDX_W'(INDEX)),
                        .sel(s1_unused), .value(w1));
  ce_ctrl_cell u_ctrl2 (.clk, .rst_n, .cbus, .my_type(BT_DIN_P2), .my_index(IDX_W'(INDEX)),
                        .sel(s2_unused), .value(w2));

  assign sel1 = w1[SEL_W-1:0];
  assign sel2 = w2[SEL_W-1:0];

  always_comb begin
    to_p1 = (32'(sel1) < 2*N) ? src[sel1] : SIG_IDLE;
    to_p2 = (32'(sel2) < 2*N) ? src[sel2] : SIG_IDLE;
  end
endmodule
