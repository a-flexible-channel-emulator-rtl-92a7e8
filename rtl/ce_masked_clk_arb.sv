// ce_masked_clk_arb: masked clock arbitrator of the delay-output routing.
//
// Timing signals cannot be ORed, so the timing output of a masked path is
// chosen by arbitration: the mask passes the carriers of the relevant delay
// cells to a priority encoder, which picks the most significant one that
// is high, and an M:1 selector passes that cell's timing.  A fixed priority
// replaces "first carrier to arrive"; the error is at most one bit period.
// When no masked carrier is high the most significant masked cell is
// selected (this design's choice), so a single-bit mask always acts as a
// plain selector; an all-zero mask gives 0.  Combinational.
module ce_masked_clk_arb #(
  parameter int unsigned M = 64
) (
  input  logic [M-1:0] carr_in,
  input  logic [M-1:0] tim_in,
  input  logic [M-1:0] mask,
  output logic         tim_out
);
  logic [M-1:0] act;
  always_comb begin
    act = carr_in & mask;
    if (act == '0) act = mask;
    tim_out = 1'b0;
    for (int i = 0; i < int'(M); i++)
      if (act[i]) tim_out = tim_in[i];   // highest set bit wins
  end
endmodule
