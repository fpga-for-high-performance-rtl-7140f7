// lb_routing: the internal block routing level around one logic block.
//
// The routing of the fabric has two levels. Outside, single-length segments
// run through C- and S-blocks; inside, every logic block sits in this local
// network, which puts a buffer on every external pin (isolating the
// pass-transistor load of the segments from the logic) and lets any signal
// reach any logic block input from any side. It holds, as in the source
// figure:
//   * input buffers on the bidirectional pins N, E, S, W (PINS per side),
//   * an input interconnect network choosing, for each of the 18 logic block
//     inputs, a pin, a logic block output (internal feedback connection) or
//     a constant 0/1,
//   * an output interconnect network choosing, for each pin, a logic block
//     output, another pin's input (bypass connection) or a constant,
//   * a tristate buffer per pin; its enable is the out_oe configuration bit.
// Each network is built here as a full multiplexer per destination, the
// simplest network that gives the "maximum flexibility" the architecture
// aims at; the figure's sparser switch pattern is not reproduced. Because
// the simulation model has no high-impedance state, a bidirectional pin is
// split into pin_in (from the C-block) and pin_out/pin_oe (towards it).
//
// Source encoding (bsfpga_pkg): 0 = 0, 1 = 1, 2..7 = d0..d5,
// 8 + side*PINS + pin = pin input. Pins are side-major, side order N,E,S,W.
// Everything is combinational.
module lb_routing
  import bsfpga_pkg::*;
(
  input  ir_cfg_t             cfg,
  input  logic [4*PINS-1:0]   pin_in,
  input  logic [LB_OUT-1:0]   d,
  output logic [LB_IN-1:0]    lb_in,
  output logic [4*PINS-1:0]   pin_out,
  output logic [4*PINS-1:0]   pin_oe
);

  logic [IR_NSRC-1:0] src;
  assign src = {pin_in, d, 1'b1, 1'b0};

  // input interconnect network (with internal feedback connections)
  for (genvar i = 0; i < LB_IN; i++) begin : g_in
    assign lb_in[i] = (32'(cfg.in_sel[i]) < IR_NSRC) ? src[cfg.in_sel[i]] : 1'b0;
  end

  // output interconnect network (with bypass connections) and tristate enables
  for (genvar p = 0; p < 4*PINS; p++) begin : g_out
    assign pin_out[p] = (32'(cfg.out_sel[p]) < IR_NSRC) ? src[cfg.out_sel[p]] : 1'b0;
    assign pin_oe[p]  = cfg.out_oe[p];
  end

endmodule
