// ce_delay_cell: one programmable delay cell with interpolator.
//
// The cell delays data, violation and carrier by the same programmable
// amount and hands them on with their timing signal.  Two stages:
//   * interpolator: a D flip-flop per signal on the 20 MHz clock (clk)
//     with a bypass selector, and an XOR that inverts the 10 MHz timing
//     signal.  With bit 0 of the delay word set, the signals are delayed by
//     one clk (half a bit period) and the RAM stage samples on the opposite
//     timing edge, adding half a bit period of delay (10 m of cable);
//   * RAM delay (ce_ram_delay): len+1 whole bit periods.
// The cell has its own control bus interface at block type MY_TYPE (3 for
// the path 1 cell, 4 for the path 2 cell) and index INDEX.  A word with
// neither step bit set loads bit 0 (interpolator) and bits [10:1] (RAM
// length).  Bit 14 requests a one-period increment and bit 15 a decrement
// of the delay; the step bits are this design's choice of how the
// asynchronous increment/decrement commands arrive.
//
// Timing: clk is the 20 MHz clock the timing signal is synchronous to;
// commands act on the first clk of a load strobe.
module ce_delay_cell
  import ce_pkg::*;
#(
  parameter int unsigned DELAY_BITS = DELAY_BITS_DEFAULT,
  parameter logic [TYPE_W-1:0] MY_TYPE = BT_DLY_G1,
  parameter int unsigned INDEX = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ctrl_bus_t cbus,
  input  sig_t      din,
  output sig_t      dout,
  output logic      ready
);
  logic                  hit, hit_q, cmd;
  logic                  interp, init, inc_req, dec_req;
  logic [DELAY_BITS-1:0] len;
  logic [2:0]            dvc_q, dvc_i, dvc_o;
  logic                  tim_i, tim_o;

  // Control bus interface.
  assign hit = cbus.load && (cbus.btype == MY_TYPE) && (cbus.bindex == IDX_W'(INDEX));
  assign cmd = hit && !hit_q;
  assign inc_req = cmd && cbus.value[DLY_INC_BIT] && !cbus.value[DLY_DEC_BIT];
  assign dec_req = cmd && cbus.value[DLY_DEC_BIT] && !cbus.value[DLY_INC_BIT];
  assign init    = cmd && !cbus.value[DLY_INC_BIT] && !cbus.value[DLY_DEC_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q  <= 1'b0;
      interp <= 1'b0;
      len    <= '0;
      dvc_q  <= 3'b000;
    end else begin
      hit_q <= hit;
      if (init) begin
        interp <= cbus.value[0];
        len    <= cbus.value[DELAY_BITS:1];
      end
      dvc_q <= {din.data, din.viol, din.carr};   // interpolator flip-flops
    end
  end

  // Interpolator: bypass selector and timing invert/non-invert.
  assign dvc_i = interp ? dvc_q : {din.data, din.viol, din.carr};
  assign tim_i = din.tim ^ interp;

  ce_ram_delay #(.DELAY_BITS(DELAY_BITS)) u_ram (
    .clk, .rst_n, .init, .len(init ? cbus.value[DELAY_BITS:1] : len),
    .inc_req, .dec_req, .din(dvc_i), .tim(tim_i), .dout(dvc_o), .tim_out(tim_o), .ready);

  assign dout = '{data: dvc_o[2], viol: dvc_o[1], carr: dvc_o[0], tim: tim_o};
endmodule
