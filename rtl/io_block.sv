// io_block: one of the 16 IO blocks on each side of the array.
//
// The source names the IO blocks (16 x 4 of them around the 8 x 8 logic
// blocks) but not their contents; this is the simplest block that does the
// job. On the array side it looks like a logic block pin on an edge C-block
// (pin_out/pin_oe towards the C-block, pin_in from it). On the chip side it
// presents the pad's input, output and output enable; the pad cell itself is
// analog and not part of the RTL.
//   cfg.out_en = 0: pad is an input; the pad value drives the array pin.
//   cfg.out_en = 1: pad is an output; the value the array routes into this
//                   block drives the pad and pad_oe is set.
//   cfg.reg_en = 1: the signal passes through a flip-flop (one clock of
//                   latency), otherwise it passes combinationally.
module io_block
  import bsfpga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  io_cfg_t cfg,
  // pad side
  input  logic    pad_in,
  output logic    pad_out,
  output logic    pad_oe,
  // array side
  input  logic    pin_in,
  output logic    pin_out,
  output logic    pin_oe
);

  logic sel, q;
  assign sel = cfg.out_en ? pin_in : pad_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= sel;
  end

  logic v;
  assign v = cfg.reg_en ? q : sel;

  assign pad_out = cfg.out_en ? v : 1'b0;
  assign pad_oe  = cfg.out_en;
  assign pin_out = cfg.out_en ? 1'b0 : v;
  assign pin_oe  = ~cfg.out_en;

endmodule
