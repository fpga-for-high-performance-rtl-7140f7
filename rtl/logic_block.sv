// logic_block: the coarse logic block of the bit-serial FPGA.
//
// Bit-serial arithmetic cells (adders, multiplier cells) are sparsely
// connected to each other but densely connected inside, so the block is made
// large enough to hold such a cell: four 4-input LUTs (e0..e3), a carry-save
// multiplexer and a 5-input-function multiplexer in each half, and six
// D flip-flops. These contents, the 18 inputs a0-a5/b0-b5/c0-c5, the six
// outputs d0-d5, the f0..f3 multiplexers behind the LUTs, the flip-flops on
// f0..f3 with a choice of registered or direct output, and the plain
// flip-flops from c0/c1 to d4/d5 follow the source figure. How the inputs are
// wired into the LUTs is this design's own reading of it:
//
//   half h (h=0: e0,e1,f0,f1, pins a0-a5, c2, c3;
//           h=1: e2,e3,f2,f3, pins b0-b5, c4, c5)
//     m        = cs    ? q[2h+1]      : c(2+2h)      carry-save multiplexer
//     e[2h]    = LUT(p0, p1, p2, m)
//     e[2h+1]  = LUT(share ? p0,p1,p2 : p3,p4,p5, m)
//     f[2h]    = mode5 ? (c(3+2h) ? e[2h+1] : e[2h]) : e[2h]
//     f[2h+1]  = e[2h+1]
//     d[i]     = oreg[i] ? q[i] : f[i],  q[i] <= f[i]   (i = 0..3)
//     d4 = q4 <= c0,  d5 = q5 <= c1
//
// With cs set, a bit-serial full adder fits in one half: the even LUT is the
// sum, the odd LUT the carry, and the carry flip-flop feeds the carry back
// without leaving the block. With share and mode5 set, f[2h] is any function
// of five inputs (p0, p1, p2, m, c(3+2h)).
//
// Timing: LUT and multiplexer paths are combinational; every flip-flop
// samples on the rising clock edge and is cleared by the active-low
// asynchronous reset. A new serial bit can be accepted every clock.
//
// Inside a tile, the direct (unregistered) outputs d0-d3 can be routed back
// to the inputs through the internal feedback connections, so lint reports
// f as circular. Only a configuration that selects the direct output and
// feeds it back to its own LUT closes that loop; registered feedback, the
// normal use, does not.
module logic_block
  import bsfpga_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  lb_cfg_t           cfg,
  input  logic [LB_IN-1:0]  lb_in,   // [5:0]=a0-a5, [11:6]=b0-b5, [17:12]=c0-c5
  output logic [LB_OUT-1:0] d
);

  logic [5:0] a, b, c;
  assign a = lb_in[5:0];
  assign b = lb_in[11:6];
  assign c = lb_in[17:12];

  logic [N_LUT-1:0] e, f;
  logic [LB_OUT-1:0] q;

  for (genvar h = 0; h < 2; h++) begin : g_half
    logic [5:0] p;
    logic       x0, x1, m;
    logic [3:0] idx_even, idx_odd;

    assign p  = (h == 0) ? a : b;
    assign x0 = c[2 + 2*h];
    assign x1 = c[3 + 2*h];

    // carry-save multiplexer: external carry or the half's own carry FF
    assign m = cfg.half[h].cs ? q[2*h + 1] : x0;

    assign idx_even = {m, p[2], p[1], p[0]};
    assign idx_odd  = cfg.half[h].share ? {m, p[2], p[1], p[0]}
                                        : {m, p[5], p[4], p[3]};

    lut4 u_lut_even (.tt(cfg.lut[2*h]),     .idx(idx_even), .o(e[2*h]));
    lut4 u_lut_odd  (.tt(cfg.lut[2*h + 1]), .idx(idx_odd),  .o(e[2*h + 1]));

    // 5-input function multiplexer
    assign f[2*h]     = (cfg.half[h].mode5 && x1) ? e[2*h + 1] : e[2*h];
    assign f[2*h + 1] = e[2*h + 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {c[1], c[0], f};
  end

  for (genvar i = 0; i < N_LUT; i++) begin : g_out
    assign d[i] = cfg.oreg[i] ? q[i] : f[i];
  end
  assign d[4] = q[4];
  assign d[5] = q[5];

endmodule
