// s_block: switch block where four single-length channel segments meet.
//
// The source describes the external routing as single-length segments joined
// by S-blocks; this block lets the segment of track t on one side continue
// on track t of any other side (a "disjoint" switch pattern, this design's
// own choice). Pass-transistor switches are modelled by direction: for each
// side s and track t, cfg.sel picks which other side drives the segment
// that leaves on side s, or none:
//   sel = 0: no drive (0), 1: side (s+1)%4, 2: side (s+2)%4, 3: side (s+3)%4
// Sides are N, E, S, W (0..3). seg_in is the value on each adjacent segment;
// drv is this block's drive into each adjacent segment, which the C-block
// owning the segment selects or ignores. Combinational.
module s_block
  import bsfpga_pkg::*;
(
  input  sb_cfg_t                  cfg,
  input  logic [3:0][CHANW-1:0]    seg_in,
  output logic [3:0][CHANW-1:0]    drv
);

  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar t = 0; t < CHANW; t++) begin : g_trk
      always_comb begin
        unique case (cfg.sel[s][t])
          2'd1:    drv[s][t] = seg_in[(s + 1) % 4][t];
          2'd2:    drv[s][t] = seg_in[(s + 2) % 4][t];
          2'd3:    drv[s][t] = seg_in[(s + 3) % 4][t];
          default: drv[s][t] = 1'b0;
        endcase
      end
    end
  end

endmodule
