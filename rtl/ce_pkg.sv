// ce_pkg: shared types and constants of the channel emulator.
//
// The emulator moves four binary signal classes between node ports: data,
// code violation, carrier and timing.  They travel together as one sig_t.
// The control bus carries a 4-bit block type, a block index, a 16-bit value
// and a load strobe; the block types and value layouts follow the emulator's
// address organization (tap = 0, delay-input path 1/2 = 1/2, delay group 1/2
// = 3/4, delay-output masks path 1 = 5..8, path 2 = 9..12).  The bit packing
// of the tap word and the step-command bits of the delay word are this
// design's own choices and are described next to their constants.
package ce_pkg;

  // Default size: 32 node ports, 2N = 64 delay cells, 1024-step RAM delay.
  localparam int unsigned N_DEFAULT  = 32;
  localparam int unsigned DELAY_BITS_DEFAULT = 10;
  localparam int unsigned IDX_W = 5;   // block-index sub-bus width (log2 of 32)
  localparam int unsigned TYPE_W = 4;  // block-type / path-select sub-bus width
  localparam int unsigned VAL_W = 16;  // value sub-bus width

  // The four signal classes of one port or path.
  typedef struct packed {
    logic data;
    logic viol;
    logic carr;
    logic tim;
  } sig_t;

  localparam sig_t SIG_IDLE = '{data: 1'b0, viol: 1'b0, carr: 1'b0, tim: 1'b0};

  // Control bus: 4 + 5 + 16 + 1 = 26 wires.
  typedef struct packed {
    logic [TYPE_W-1:0] btype;
    logic [IDX_W-1:0]  bindex;
    logic [VAL_W-1:0]  value;
    logic              load;
  } ctrl_bus_t;

  // Block types.
  localparam logic [TYPE_W-1:0] BT_TAP      = 4'd0;
  localparam logic [TYPE_W-1:0] BT_DIN_P1   = 4'd1;
  localparam logic [TYPE_W-1:0] BT_DIN_P2   = 4'd2;
  localparam logic [TYPE_W-1:0] BT_DLY_G1   = 4'd3;
  localparam logic [TYPE_W-1:0] BT_DLY_G2   = 4'd4;
  localparam logic [TYPE_W-1:0] BT_DOUT_P1  = 4'd5;   // quarters 5..8
  localparam logic [TYPE_W-1:0] BT_DOUT_P2  = 4'd9;   // quarters 9..12

  // Tap word layout: bits [8:0] configure the data/violation/carrier cells
  // (bit n-1 drives selector control line n: lines 1-3 = Node RCV selector
  // A0..A2, 4-6 = Path 2 XMT selector, 7-9 = Path 1 XMT selector); bits
  // [15:9] configure the timing cell ([11:9] Node RCV selector A0..A2,
  // [12] / [13] = A1 / A2 of the path 1 arbitrator, [14] / [15] = A1 / A2
  // of the path 2 arbitrator).
  typedef struct packed {
    logic [1:0] p2_mode;   // {A2, A1}
    logic [1:0] p1_mode;   // {A2, A1}
    logic [2:0] rcv_sel;   // {A2, A1, A0}
  } tim_cfg_t;

  typedef struct packed {
    logic [2:0] p1_sel;    // control lines 9..7
    logic [2:0] p2_sel;    // control lines 6..4
    logic [2:0] rcv_sel;   // control lines 3..1
  } dvc_cfg_t;

  typedef struct packed {
    tim_cfg_t tim;
    dvc_cfg_t dvc;
  } tap_cfg_t;

  // Arbitrator modes, written as the (A1, A2) pair.
  typedef enum logic [1:0] {
    ARB_BOTH   = 2'b00,   // A1=0 A2=0: node when its carrier is high, else path
    ARB_NODE   = 2'b10,   // A1=0 A2=1 (stored {A2,A1})
    ARB_PATH   = 2'b01,   // A1=1 A2=0
    ARB_ZERO   = 2'b11
  } arb_mode_e;

  // Delay word: bit 0 = interpolator, bits [10:1] = RAM delay value.  Bit 14
  // requests a one-step increment and bit 15 a one-step decrement of the
  // delay (mobile radio); such a word leaves the stored value alone.
  localparam int unsigned DLY_INC_BIT = 14;
  localparam int unsigned DLY_DEC_BIT = 15;

  // Build a control bus word (used by controllers and testbenches).
  function automatic ctrl_bus_t cbus_word(logic [TYPE_W-1:0] t, logic [IDX_W-1:0] i,
                                          logic [VAL_W-1:0] v);
    ctrl_bus_t w;
    w.btype = t;
    w.bindex = i;
    w.value = v;
    w.load = 1'b1;
    return w;
  endfunction

  // Tap word from the printed 9-bit (Node RCV, Path 1 XMT, Path 2 XMT)
  // selector addresses and the printed 7-bit (Node RCV, Path 1 A1A2,
  // Path 2 A1A2) timing address.
  function automatic logic [15:0] tap_word(logic [2:0] rcv, logic [2:0] p1, logic [2:0] p2,
                                           logic [2:0] trcv, logic [1:0] tp1_a1a2,
                                           logic [1:0] tp2_a1a2);
    tap_cfg_t c;
    c.dvc.rcv_sel = rcv;
    c.dvc.p1_sel = p1;
    c.dvc.p2_sel = p2;
    c.tim.rcv_sel = trcv;
    c.tim.p1_mode = {tp1_a1a2[0], tp1_a1a2[1]};
    c.tim.p2_mode = {tp2_a1a2[0], tp2_a1a2[1]};
    return c;
  endfunction

endpackage
