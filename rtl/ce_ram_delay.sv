// ce_ram_delay: RAM-based delay cell for data, violation and carrier.
//
// A 2^DELAY_BITS x 3-bit RAM acts as a circular bucket brigade.  A write
// pointer and a read pointer advance together on every rising edge of the
// timing signal that travels with the three signals; the read pointer trails
// the write pointer by len+1 entries, so each bit leaves len+1 timing periods
// after it entered (1 to 1024 periods at the default size).  The timing
// signal itself is not delayed, only retimed: dout and tim_out both change
// one clk after the input edge, so they stay aligned exactly as at the input.
//
// Mobile nodes: an increment request holds the read pointer for one period
// and a decrement request holds the write pointer for one period.  Each is
// kept pending until it can act on an idle sample (carrier low): the
// increment when the sample being read is idle, the decrement when the
// incoming sample is idle, so no bit of a transmission is dropped or
// repeated.  Steps stop at the ends of the range.
//
// clk must run at least twice as fast as the timing signal, which is sampled
// as data.  After reset the cell first clears its RAM, one word per clk
// (2^DELAY_BITS clks); during that sweep the output is idle.  `init` loads a
// new length and re-places the read pointer; it is also this design's
// choice to cancel pending steps then.
module ce_ram_delay #(
  parameter int unsigned DELAY_BITS = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,      // load `len`
  input  logic [DELAY_BITS-1:0] len,       // delay = len+1 timing periods
  input  logic                  inc_req,   // one-period increment request
  input  logic                  dec_req,   // one-period decrement request
  input  logic [2:0]            din,       // {data, viol, carr}
  input  logic                  tim,
  output logic [2:0]            dout,
  output logic                  tim_out,
  output logic                  ready      // RAM cleared, cell running
);
  localparam int unsigned DEPTH = 1 << DELAY_BITS;
  localparam logic [DELAY_BITS-1:0] LEN_MAX = '1;

  logic [2:0]            mem [DEPTH];
  logic [DELAY_BITS-1:0] wr, rd, cur_len, clr_addr;
  logic                  tim_q, tedge, inc_pend, dec_pend, clearing;
  logic                  hold_rd, hold_wr;
  logic [2:0]            rd_word;
  logic [DELAY_BITS-1:0] wr_next;

  assign tedge   = tim & ~tim_q & ~clearing;
  assign rd_word = mem[rd];
  // Increment: repeat an idle sample on the read side.
  assign hold_rd = inc_pend && !rd_word[0] && (cur_len != LEN_MAX);
  // Decrement: drop an idle sample on the write side.
  assign hold_wr = dec_pend && !din[0] && (cur_len != '0);

  assign wr_next = (tedge && !hold_wr) ? wr + 1'b1 : wr;

  // RAM: the clearing sweep and the timing-edge write share one port.
  always_ff @(posedge clk) begin
    if (clearing)   mem[clr_addr] <= 3'b000;
    else if (tedge) mem[wr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tim_q    <= 1'b0;
      wr       <= '0;
      rd       <= '1;          // len 0: one period behind the writer
      cur_len  <= '0;
      inc_pend <= 1'b0;
      dec_pend <= 1'b0;
      dout     <= 3'b000;
      clearing <= 1'b1;
      clr_addr <= '0;
    end else begin
      tim_q <= tim;
      if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == LEN_MAX) clearing <= 1'b0;
      end
      if (inc_req) inc_pend <= 1'b1;
      if (dec_req) dec_pend <= 1'b1;
      if (tedge) begin
        dout <= rd_word;
        if (hold_rd) begin
          inc_pend <= 1'b0;
          cur_len  <= cur_len + 1'b1;
        end else begin
          rd <= rd + 1'b1;
        end
        if (hold_wr) begin
          dec_pend <= 1'b0;
          cur_len  <= cur_len - 1'b1;
        end
        wr <= wr_next;
        if (hold_rd && hold_wr) cur_len <= cur_len;
      end
      if (init) begin
        // Read pointer trails the (next) write pointer by len+1 entries.
        rd       <= wr_next - len - 1'b1;
        cur_len  <= len;
        inc_pend <= 1'b0;
        dec_pend <= 1'b0;
      end
    end
  end

  assign tim_out = tim_q;
  assign ready   = ~clearing;
endmodule
