// cfg_frame: configuration memory of one configurable block.
//
// Holds WIDTH configuration bits, loaded over the fabric's configuration
// bus in CFG_DW-bit words: when cfg_we is set and cfg_blk equals BLK_ID,
// word cfg_word (bits cfg_word*CFG_DW upwards) takes cfg_wdata on the rising
// clock edge. Reset clears every bit, which leaves all switches open and all
// LUTs at 0. While rst_n is low the cfg output also reads as all zeros
// straight away, so that a random power-up state cannot close a
// combinational loop through the routing before the first clock edge. The
// source does not describe how the chip is configured; this
// addressed word bus is this design's own choice.
module cfg_frame
  import bsfpga_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned BLK_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CFG_BW-1:0] cfg_blk,
  input  logic [CFG_AW-1:0] cfg_word,
  input  logic [CFG_DW-1:0] cfg_wdata,
  output logic [WIDTH-1:0]  cfg
);

  localparam int unsigned NWORDS = (WIDTH + CFG_DW - 1) / CFG_DW;

  logic [NWORDS*CFG_DW-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (cfg_we && (32'(cfg_blk) == BLK_ID) && (32'(cfg_word) < NWORDS)) begin
      mem[cfg_word*CFG_DW +: CFG_DW] <= cfg_wdata;
    end
  end

  assign cfg = rst_n ? mem[WIDTH-1:0] : '0;

endmodule
