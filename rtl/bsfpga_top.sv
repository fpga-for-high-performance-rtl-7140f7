// bsfpga_top: the bit-serial FPGA, an 8x8 array of logic blocks with
// two-level routing and 16 IO blocks per chip side.
//
// Geometry (x grows east, y grows north):
//   * lb_tile (x,y), x,y in 0..7: logic block with its internal routing.
//   * s_block (i,j), i,j in 0..8: at every channel crossing, including the
//     ring around the array.
//   * horizontal c_block HC(x,j), j in 0..8: in horizontal channel j, between
//     tile (x,j) (side A, its S pins) and tile (x,j-1) (side B, its N pins);
//     its CHANW segments run from S-block (x,j) (end 0) to (x+1,j) (end 1).
//   * vertical c_block VC(i,y), i in 0..8: in vertical channel i, between
//     tile (i,y) (side A, its W pins) and tile (i-1,y) (side B, its E pins);
//     segments run from S-block (i,y) (end 0) to (i,y+1) (end 1).
//   * On the outer channels the missing tile side is replaced by IO_PER_CB
//     IO blocks on pins 0..IO_PER_CB-1 of that side: 8 C-blocks x 2 = 16
//     IO blocks per chip side, 64 in all, as in the source.
// Every tile thus owns, in the source's words, one logic block, one S-block
// and two C-blocks; the extra S- and C-blocks close the ring at the edge.
//
// Pads: pad_in/pad_out/pad_oe[side][k], side N,E,S,W. On the N and S sides
// k = 2*x + pin, on the E and W sides k = 2*y + pin.
//
// Configuration: every block has a cfg_frame on the write bus
// (cfg_we, cfg_blk, cfg_word, cfg_wdata), 16 bits per word. Block ids, from
// bsfpga_pkg: tile 8*y + x; S-block ID_SB + 9*j + i; HC ID_HCB + 8*j + x;
// VC ID_VCB + 8*i + y; IO block ID_IO + 16*side + k. The bus and the id map
// are this design's own; the source does not describe configuration.
//
// All routing is combinational. A configuration can close a combinational
// loop through segments and switches, exactly as on the real chip; the
// structure therefore contains loops that a valid configuration never
// activates, and lint tools report them. The user clock clk drives the
// logic block and IO block flip-flops and the configuration memory.
module bsfpga_top
  import bsfpga_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration bus
  input  logic                           cfg_we,
  input  logic [CFG_BW-1:0]              cfg_blk,
  input  logic [CFG_AW-1:0]              cfg_word,
  input  logic [CFG_DW-1:0]              cfg_wdata,
  // pads
  input  logic [3:0][IO_PER_SIDE-1:0]    pad_in,
  output logic [3:0][IO_PER_SIDE-1:0]    pad_out,
  output logic [3:0][IO_PER_SIDE-1:0]    pad_oe
);

  localparam int unsigned NX = ARRAY_X;
  localparam int unsigned NY = ARRAY_Y;

  // tile pins, [x][y][side]
  logic [PINS-1:0] t_in  [NX][NY][4];
  logic [PINS-1:0] t_out [NX][NY][4];
  logic [PINS-1:0] t_oe  [NX][NY][4];

  // segment values and S-block drives
  logic [CHANW-1:0]      hseg [NX][NY+1];
  logic [CHANW-1:0]      vseg [NX+1][NY];
  logic [3:0][CHANW-1:0] sdrv [NX+1][NY+1];

  // IO block array-side pins, [side][k]
  logic io_pin_in  [4][IO_PER_SIDE];
  logic io_pin_out [4][IO_PER_SIDE];
  logic io_pin_oe  [4][IO_PER_SIDE];

  // ---------------- tiles ----------------
  for (genvar x = 0; x < NX; x++) begin : g_tx
    for (genvar y = 0; y < NY; y++) begin : g_ty
      tile_cfg_t cfg;
      logic [3:0][PINS-1:0] pin_in, pin_out, pin_oe;

      cfg_frame #(.WIDTH(TILE_CFG_BITS), .BLK_ID(ID_TILE + NX*y + x)) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_blk, .cfg_word, .cfg_wdata, .cfg(cfg)
      );

      lb_tile u_tile (
        .clk, .rst_n, .cfg(cfg),
        .pin_in(pin_in), .pin_out(pin_out), .pin_oe(pin_oe)
      );

      for (genvar s = 0; s < 4; s++) begin : g_s
        assign pin_in[s]     = t_in[x][y][s];
        assign t_out[x][y][s] = pin_out[s];
        assign t_oe[x][y][s]  = pin_oe[s];
      end
    end
  end

  // ---------------- S-blocks ----------------
  for (genvar i = 0; i <= NX; i++) begin : g_si
    for (genvar j = 0; j <= NY; j++) begin : g_sj
      sb_cfg_t cfg;
      logic [3:0][CHANW-1:0] seg_in;

      cfg_frame #(.WIDTH(SB_CFG_BITS), .BLK_ID(ID_SB + (NX+1)*j + i)) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_blk, .cfg_word, .cfg_wdata, .cfg(cfg)
      );

      if (j < NY) begin : g_n assign seg_in[SIDE_N] = vseg[i][j];   end
      else        begin : g_n assign seg_in[SIDE_N] = '0;           end
      if (i < NX) begin : g_e assign seg_in[SIDE_E] = hseg[i][j];   end
      else        begin : g_e assign seg_in[SIDE_E] = '0;           end
      if (j > 0)  begin : g_s assign seg_in[SIDE_S] = vseg[i][j-1]; end
      else        begin : g_s assign seg_in[SIDE_S] = '0;           end
      if (i > 0)  begin : g_w assign seg_in[SIDE_W] = hseg[i-1][j]; end
      else        begin : g_w assign seg_in[SIDE_W] = '0;           end

      s_block u_sb (.cfg(cfg), .seg_in(seg_in), .drv(sdrv[i][j]));
    end
  end

  // ---------------- horizontal C-blocks ----------------
  for (genvar x = 0; x < NX; x++) begin : g_hx
    for (genvar j = 0; j <= NY; j++) begin : g_hj
      cb_cfg_t cfg;
      logic [PINS-1:0] a_out, a_oe, b_out, b_oe, a_in, b_in;

      cfg_frame #(.WIDTH(CB_CFG_BITS), .BLK_ID(ID_HCB + NX*j + x)) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_blk, .cfg_word, .cfg_wdata, .cfg(cfg)
      );

      // side A: tile (x,j) S pins, or north IO blocks on the top channel
      if (j < NY) begin : g_a
        assign a_out = t_out[x][j][SIDE_S];
        assign a_oe  = t_oe[x][j][SIDE_S];
        assign t_in[x][j][SIDE_S] = a_in;
      end else begin : g_a
        for (genvar p = 0; p < PINS; p++) begin : g_p
          if (p < IO_PER_CB) begin : g_io
            assign a_out[p] = io_pin_out[SIDE_N][IO_PER_CB*x + p];
            assign a_oe[p]  = io_pin_oe[SIDE_N][IO_PER_CB*x + p];
            assign io_pin_in[SIDE_N][IO_PER_CB*x + p] = a_in[p];
          end else begin : g_nc
            assign a_out[p] = 1'b0;
            assign a_oe[p]  = 1'b0;
          end
        end
      end

      // side B: tile (x,j-1) N pins, or south IO blocks on the bottom channel
      if (j > 0) begin : g_b
        assign b_out = t_out[x][j-1][SIDE_N];
        assign b_oe  = t_oe[x][j-1][SIDE_N];
        assign t_in[x][j-1][SIDE_N] = b_in;
      end else begin : g_b
        for (genvar p = 0; p < PINS; p++) begin : g_p
          if (p < IO_PER_CB) begin : g_io
            assign b_out[p] = io_pin_out[SIDE_S][IO_PER_CB*x + p];
            assign b_oe[p]  = io_pin_oe[SIDE_S][IO_PER_CB*x + p];
            assign io_pin_in[SIDE_S][IO_PER_CB*x + p] = b_in[p];
          end else begin : g_nc
            assign b_out[p] = 1'b0;
            assign b_oe[p]  = 1'b0;
          end
        end
      end

      c_block u_cb (
        .cfg(cfg),
        .a_out(a_out), .a_oe(a_oe), .b_out(b_out), .b_oe(b_oe),
        .a_in(a_in), .b_in(b_in),
        .sb0_drv(sdrv[x][j][SIDE_E]), .sb1_drv(sdrv[x+1][j][SIDE_W]),
        .trk(hseg[x][j])
      );
    end
  end

  // ---------------- vertical C-blocks ----------------
  for (genvar i = 0; i <= NX; i++) begin : g_vi
    for (genvar y = 0; y < NY; y++) begin : g_vy
      cb_cfg_t cfg;
      logic [PINS-1:0] a_out, a_oe, b_out, b_oe, a_in, b_in;

      cfg_frame #(.WIDTH(CB_CFG_BITS), .BLK_ID(ID_VCB + NY*i + y)) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_blk, .cfg_word, .cfg_wdata, .cfg(cfg)
      );

      // side A: tile (i,y) W pins, or east IO blocks on the rightmost channel
      if (i < NX) begin : g_a
        assign a_out = t_out[i][y][SIDE_W];
        assign a_oe  = t_oe[i][y][SIDE_W];
        assign t_in[i][y][SIDE_W] = a_in;
      end else begin : g_a
        for (genvar p = 0; p < PINS; p++) begin : g_p
          if (p < IO_PER_CB) begin : g_io
            assign a_out[p] = io_pin_out[SIDE_E][IO_PER_CB*y + p];
            assign a_oe[p]  = io_pin_oe[SIDE_E][IO_PER_CB*y + p];
            assign io_pin_in[SIDE_E][IO_PER_CB*y + p] = a_in[p];
          end else begin : g_nc
            assign a_out[p] = 1'b0;
            assign a_oe[p]  = 1'b0;
          end
        end
      end

      // side B: tile (i-1,y) E pins, or west IO blocks on the leftmost channel
      if (i > 0) begin : g_b
        assign b_out = t_out[i-1][y][SIDE_E];
        assign b_oe  = t_oe[i-1][y][SIDE_E];
        assign t_in[i-1][y][SIDE_E] = b_in;
      end else begin : g_b
        for (genvar p = 0; p < PINS; p++) begin : g_p
          if (p < IO_PER_CB) begin : g_io
            assign b_out[p] = io_pin_out[SIDE_W][IO_PER_CB*y + p];
            assign b_oe[p]  = io_pin_oe[SIDE_W][IO_PER_CB*y + p];
            assign io_pin_in[SIDE_W][IO_PER_CB*y + p] = b_in[p];
          end else begin : g_nc
            assign b_out[p] = 1'b0;
            assign b_oe[p]  = 1'b0;
          end
        end
      end

      c_block u_cb (
        .cfg(cfg),
        .a_out(a_out), .a_oe(a_oe), .b_out(b_out), .b_oe(b_oe),
        .a_in(a_in), .b_in(b_in),
        .sb0_drv(sdrv[i][y][SIDE_N]), .sb1_drv(sdrv[i][y+1][SIDE_S]),
        .trk(vseg[i][y])
      );
    end
  end

  // ---------------- IO blocks ----------------
  for (genvar s = 0; s < 4; s++) begin : g_ios
    for (genvar k = 0; k < IO_PER_SIDE; k++) begin : g_iok
      io_cfg_t cfg;

      cfg_frame #(.WIDTH(IO_CFG_BITS), .BLK_ID(ID_IO + IO_PER_SIDE*s + k)) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_blk, .cfg_word, .cfg_wdata, .cfg(cfg)
      );

      io_block u_io (
        .clk, .rst_n, .cfg(cfg),
        .pad_in(pad_in[s][k]), .pad_out(pad_out[s][k]), .pad_oe(pad_oe[s][k]),
        .pin_in(io_pin_in[s][k]), .pin_out(io_pin_out[s][k]), .pin_oe(io_pin_oe[s][k])
      );
    end
  end

endmodule
