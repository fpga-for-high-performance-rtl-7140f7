// lb_tile: one logic block inside its internal routing level.
//
// Joins logic_block and lb_routing: the 18 logic block inputs come from the
// input interconnect network, the six outputs feed both the output
// interconnect network and, as internal feedback, the input network. To the
// outside the tile shows PINS bidirectional pins on each of its four sides,
// split into pin_in (from the C-block) and pin_out/pin_oe (to it), side
// order N, E, S, W. Configuration is one tile_cfg_t. The only state is the
// six logic block flip-flops (rising edge, asynchronous active-low reset).
//
// Lint reports the path d -> input network -> LUT -> d as a combinational
// loop; it exists only when a direct (unregistered) output is configured to
// feed its own LUT, which a valid configuration avoids.
module lb_tile
  import bsfpga_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  tile_cfg_t             cfg,
  input  logic [3:0][PINS-1:0]  pin_in,
  output logic [3:0][PINS-1:0]  pin_out,
  output logic [3:0][PINS-1:0]  pin_oe
);

  logic [LB_IN-1:0]  lb_in;
  logic [LB_OUT-1:0] d;

  logic_block u_lb (
    .clk   (clk),
    .rst_n (rst_n),
    .cfg   (cfg.lb),
    .lb_in (lb_in),
    .d     (d)
  );

  lb_routing u_ir (
    .cfg     (cfg.ir),
    .pin_in  (pin_in),
    .d       (d),
    .lb_in   (lb_in),
    .pin_out (pin_out),
    .pin_oe  (pin_oe)
  );

endmodule
