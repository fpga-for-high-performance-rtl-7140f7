// c_block: connection block between two facing logic block sides.
//
// A C-block sits in a routing channel between two neighbours (side A and
// side B, PINS bidirectional pins each) and is crossed by CHANW single-length
// segments, each running from the S-block at end 0 to the S-block at end 1.
// It connects logic block pins to the segments and, so that the frequent
// neighbour-to-neighbour connections of bit-serial circuits cost no channel
// track, also connects the pins of the two neighbours directly to each other.
// At the array edge one side holds IO blocks instead of a logic block.
//
// Pass-transistor switches are modelled as configured directions:
//   * every pin input (a_in, b_in) takes one source: a track, a pin output of
//     the opposite side, or 0 (cfg.a_sel / cfg.b_sel, see bsfpga_pkg);
//   * every track takes one driver: the S-block at either end, a pin of
//     side A or side B, or none (cfg.t_sel). A pin drives only while its
//     tristate enable is set; otherwise it contributes 0.
// The sources a pin or track may use and their encodings are this design's
// own choice; the source gives only the block's function. Combinational.
//
// In the assembled array a track can be routed back to its own driver
// through S-blocks and other C-blocks, so lint sees circular logic on trk.
// That loop is part of any configurable routing; a valid configuration never
// closes it.
module c_block
  import bsfpga_pkg::*;
(
  input  cb_cfg_t           cfg,
  input  logic [PINS-1:0]   a_out, a_oe,   // side A pins, towards the channel
  input  logic [PINS-1:0]   b_out, b_oe,   // side B pins, towards the channel
  output logic [PINS-1:0]   a_in,          // into side A pins
  output logic [PINS-1:0]   b_in,          // into side B pins
  input  logic [CHANW-1:0]  sb0_drv,       // S-block at end 0 driving each track
  input  logic [CHANW-1:0]  sb1_drv,       // S-block at end 1 driving each track
  output logic [CHANW-1:0]  trk            // value on each segment
);

  logic [PINS-1:0] a_drv, b_drv;
  assign a_drv = a_out & a_oe;
  assign b_drv = b_out & b_oe;

  // track drivers
  logic [CB_TSRC-1:0] tsrc [CHANW];
  for (genvar t = 0; t < CHANW; t++) begin : g_trk
    assign tsrc[t] = {b_drv, a_drv, sb1_drv[t], sb0_drv[t], 1'b0};
    assign trk[t]  = (32'(cfg.t_sel[t]) < CB_TSRC) ? tsrc[t][cfg.t_sel[t]] : 1'b0;
  end

  // pin inputs
  logic [CB_PSRC-1:0] a_src, b_src;
  assign a_src = {b_drv, trk, 1'b0};
  assign b_src = {a_drv, trk, 1'b0};
  for (genvar p = 0; p < PINS; p++) begin : g_pin
    assign a_in[p] = (32'(cfg.a_sel[p]) < CB_PSRC) ? a_src[cfg.a_sel[p]] : 1'b0;
    assign b_in[p] = (32'(cfg.b_sel[p]) < CB_PSRC) ? b_src[cfg.b_sel[p]] : 1'b0;
  end

endmodule
