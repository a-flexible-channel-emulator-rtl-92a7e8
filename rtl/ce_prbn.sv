// ce_prbn: pseudo-random binary noise source for fault injection.
//
// Fault options in the tap cells can replace a signal by pseudo-random
// noise.  This source is a 15-bit maximal-length Fibonacci LFSR
// (x^15 + x^14 + 1) stepping once per clk; `noise` is its last stage.  The
// polynomial, the length and the per-instance SEED are this design's
// choices: only the presence of noise sources is given.
module ce_prbn #(
  parameter logic [14:0] SEED = 15'h0001
) (
  input  logic clk,
  input  logic rst_n,
  output logic noise
);
  logic [14:0] lfsr;
  // A zero seed would lock the register; substitute a non-zero one.
  localparam logic [14:0] SEED_NZ = (SEED == 15'd0) ? 15'h0001 : SEED;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= SEED_NZ;
    else        lfsr <= {lfsr[13:0], lfsr[14] ^ lfsr[13]};
  end
  assign noise = lfsr[14];
endmodule
