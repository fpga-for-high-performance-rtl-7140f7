// tb_s_block: self-checking test of the switch block.
//
// For random configurations and segment values, every drive output (side s,
// track t) must equal track t of side (s+sel)%4, or 0 for sel = 0: a segment
// may turn left, go straight or turn right but never changes track.
module tb_s_block;
  import bsfpga_pkg::*;

  sb_cfg_t cfg;
  logic [3:0][CHANW-1:0] seg_in, drv;
  logic exp_v;

  int checks = 0, failures = 0;

  s_block dut (.cfg, .seg_in, .drv);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      cfg    = $bits(sb_cfg_t)'({$urandom, $urandom});
      seg_in = $bits(seg_in)'($urandom);
      #1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < CHANW; t++) begin
          exp_v = (cfg.sel[s][t] == 0) ? 1'b0 : seg_in[(s + cfg.sel[s][t]) % 4][t];
          checks++;
          if (drv[s][t] !== exp_v) begin
            failures++;
            $display("side %0d track %0d sel %0d wrong", s, t, cfg.sel[s][t]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
