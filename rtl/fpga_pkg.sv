// fpga_pkg: sizes and configuration record layouts shared by the low-power
// FPGA fabric.
//
// The fabric groups four configurable logic blocks (CLBs) into one supply
// island. A CLB holds N=4 basic logic elements (BLEs), has I=5 inputs and
// O=3 outputs; these three numbers and the island size follow the
// architecture. The LUT size K=4 and the routing channel width W=20 are this
// design's choices (W is wide enough to carry the 17 inputs of an 8-bit
// ripple-carry adder through one channel).
//
// Configuration records are packed structs; a tile's record is what its serial
// configuration chain holds. Field order inside the records fixes the bit
// order of the bitstream: the most significant bit of a tile record is the
// first bit shifted into that tile.
package fpga_pkg;

  localparam int unsigned K               = 4;   // LUT inputs
  localparam int unsigned N               = 4;   // BLEs per CLB
  localparam int unsigned I               = 5;   // CLB inputs
  localparam int unsigned O               = 3;   // CLB outputs
  localparam int unsigned W               = 20;  // routing tracks per channel
  localparam int unsigned CLBS_PER_ISLAND = 4;   // CLBs sharing one supply

  localparam int unsigned XSEL_W = $clog2(I + N);  // crossbar select width
  localparam int unsigned OSEL_W = $clog2(N);      // CLB output select width
  localparam int unsigned TSEL_W = $clog2(W);      // track select width

  // Supply level of a control line of the level shifter (0 V, VDDL or VDDH).
  typedef enum logic [1:0] {
    LV_0V   = 2'd0,
    LV_VDDL = 2'd1,
    LV_VDDH = 2'd2
  } level_e;

  // Switch block choice for one outgoing track.
  typedef enum logic [1:0] {
    SB_STRAIGHT = 2'd0,  // same track index
    SB_NEXT     = 2'd1,  // incoming track index + 1 (mod W)
    SB_PREV     = 2'd2,  // incoming track index - 1 (mod W)
    SB_OFF      = 2'd3   // no switch on: track reads 0
  } sb_sel_e;

  // One BLE: LUT truth table, output mux select, and the crossbar source of
  // each LUT input (0..I-1: CLB input, I..I+N-1: BLE output feedback).
  typedef struct packed {
    logic [2**K-1:0]             truth;
    logic                        use_ff;
    logic [K-1:0][XSEL_W-1:0]    in_sel;
  } ble_cfg_t;

  typedef struct packed {
    ble_cfg_t [N-1:0]            ble;
    logic [O-1:0][OSEL_W-1:0]    out_sel;  // BLE driving each CLB output
  } clb_cfg_t;

  // Connection block: the track read by each CLB input, and for each track
  // whether it passes through (0) or is driven by CLB output k (k+1).
  typedef struct packed {
    logic [I-1:0][TSEL_W-1:0]    ipin_sel;
    logic [W-1:0][1:0]           opin_drv;
  } cb_cfg_t;

  typedef struct packed {
    sb_sel_e [W-1:0]             route;
  } sb_cfg_t;

  typedef struct packed {
    clb_cfg_t clb;
    cb_cfg_t  cb;
    sb_cfg_t  sb;
  } tile_cfg_t;

  localparam int unsigned TILE_CFG_BITS = $bits(tile_cfg_t);

endpackage
