// bsfpga_pkg: sizes, source encodings and configuration records shared by
// the blocks of the bit-serial FPGA fabric.
//
// The fabric is an 8x8 array of logic blocks (four 4-input LUTs, six
// flip-flops), each wrapped in its own internal routing level, joined by
// single-length routing segments through C-blocks (pin to segment) and
// S-blocks (segment to segment), with 16 IO blocks on each side of the array.
// Array size, IO block count and the logic block contents follow the source
// description. Pins per logic block side, channel width and all encodings
// below are this design's own choices; they are the knobs to turn when
// exploring the architecture.
//
// Every configurable block takes its configuration as one of the packed
// structs below. The top stores each struct in a cfg_frame register that is
// loaded 16 bits at a time over a simple write bus.
package bsfpga_pkg;

  // ---------------- array geometry ----------------
  localparam int unsigned ARRAY_X     = 8;   // logic block columns
  localparam int unsigned ARRAY_Y     = 8;   // logic block rows
  localparam int unsigned IO_PER_SIDE = 16;  // IO blocks on each chip side
  localparam int unsigned IO_PER_CB   = IO_PER_SIDE / ARRAY_X; // per edge C-block

  // ---------------- routing sizes (own choice) ----------------
  localparam int unsigned PINS  = 4;   // bidirectional pins per logic block side
  localparam int unsigned CHANW = 8;   // single-length tracks per channel

  // ---------------- logic block ----------------
  localparam int unsigned LB_IN  = 18; // a0-a5, b0-b5, c0-c5
  localparam int unsigned LB_OUT = 6;  // d0-d5
  localparam int unsigned N_LUT  = 4;

  // Sides of a logic block / S-block. Index order used in every array.
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // One half of the logic block: two LUTs sharing a carry-save multiplexer.
  typedef struct packed {
    logic cs;     // 1: LUT input 3 is the half's own registered carry (odd FF)
    logic share;  // 1: odd LUT reads the same four inputs as the even LUT
    logic mode5;  // 1: even output = 5-input function (odd/even LUT picked by x1)
  } lb_half_cfg_t;

  typedef struct packed {
    logic [N_LUT-1:0][15:0] lut;   // truth tables, index = {in3,in2,in1,in0}
    lb_half_cfg_t [1:0]     half;
    logic [N_LUT-1:0]       oreg;  // 1: d[i] is the registered f[i]
  } lb_cfg_t;

  // ---------------- internal block routing ----------------
  // Source index shared by the input interconnect network and the output
  // interconnect network:
  //   0        constant 0
  //   1        constant 1
  //   2..7     logic block outputs d0..d5 (feedback / output)
  //   8..23    pin input buffers, side-major: 8 + side*PINS + pin (bypass)
  localparam int unsigned IR_NSRC   = 2 + LB_OUT + 4 * PINS;
  localparam int unsigned IR_SEL_W  = $clog2(IR_NSRC);

  typedef struct packed {
    logic [LB_IN-1:0][IR_SEL_W-1:0]   in_sel;   // per logic block input
    logic [4*PINS-1:0][IR_SEL_W-1:0]  out_sel;  // per pin, side-major
    logic [4*PINS-1:0]                out_oe;   // per pin tristate enable
  } ir_cfg_t;

  typedef struct packed {
    lb_cfg_t lb;
    ir_cfg_t ir;
  } tile_cfg_t;

  // ---------------- C-block ----------------
  // Pin input source: 0 = constant 0, 1..CHANW = track t-1,
  //                   CHANW+1..CHANW+PINS = opposite-side pin output.
  localparam int unsigned CB_PSRC   = 1 + CHANW + PINS;
  localparam int unsigned CB_PSEL_W = $clog2(CB_PSRC);
  // Track driver: 0 = undriven (0), 1 = S-block at end 0, 2 = S-block at
  // end 1, 3..3+PINS-1 = side A pin, 3+PINS.. = side B pin.
  localparam int unsigned CB_TSRC   = 3 + 2 * PINS;
  localparam int unsigned CB_TSEL_W = $clog2(CB_TSRC);

  typedef struct packed {
    logic [PINS-1:0][CB_PSEL_W-1:0]  a_sel;  // side A pin inputs
    logic [PINS-1:0][CB_PSEL_W-1:0]  b_sel;  // side B pin inputs
    logic [CHANW-1:0][CB_TSEL_W-1:0] t_sel;  // track drivers
  } cb_cfg_t;

  // ---------------- S-block ----------------
  // Drive of track t on side s: 0 = none, 1..3 = same track on the other
  // sides, taken in order (s+1)%4, (s+2)%4, (s+3)%4.
  typedef struct packed {
    logic [3:0][CHANW-1:0][1:0] sel;
  } sb_cfg_t;

  // ---------------- IO block ----------------
  typedef struct packed {
    logic out_en;   // 1: pad is an output fed from the array, 0: pad is an input
    logic reg_en;   // 1: register the signal passing through
  } io_cfg_t;

  // ---------------- configuration bus ----------------
  localparam int unsigned CFG_DW = 16;  // bits per configuration word
  localparam int unsigned CFG_AW = 5;   // word address within a block
  localparam int unsigned CFG_BW = 9;   // block id

  localparam int unsigned TILE_CFG_BITS = $bits(tile_cfg_t);
  localparam int unsigned CB_CFG_BITS   = $bits(cb_cfg_t);
  localparam int unsigned SB_CFG_BITS   = $bits(sb_cfg_t);
  localparam int unsigned IO_CFG_BITS   = $bits(io_cfg_t);

  // Block id map of the configuration bus.
  localparam int unsigned N_TILE = ARRAY_X * ARRAY_Y;          // 64
  localparam int unsigned N_SB   = (ARRAY_X + 1) * (ARRAY_Y + 1); // 81
  localparam int unsigned N_HCB  = ARRAY_X * (ARRAY_Y + 1);    // 72
  localparam int unsigned N_VCB  = (ARRAY_X + 1) * ARRAY_Y;    // 72
  localparam int unsigned N_IO   = 4 * IO_PER_SIDE;            // 64
  localparam int unsigned ID_TILE = 0;
  localparam int unsigned ID_SB   = ID_TILE + N_TILE;
  localparam int unsigned ID_HCB  = ID_SB + N_SB;
  localparam int unsigned ID_VCB  = ID_HCB + N_HCB;
  localparam int unsigned ID_IO   = ID_VCB + N_VCB;
  localparam int unsigned N_CFG_BLK = ID_IO + N_IO;             // 353

endpackage
