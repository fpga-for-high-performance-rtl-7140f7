// tb_lb_routing: self-checking test of the internal block routing.
//
// Drives random configurations, pin inputs and logic block outputs and
// checks every logic block input and every pin output against the source
// table (0, 1, d0..d5, then the 16 pins side-major), including the internal
// feedback and bypass sources. Also counts that each kind of source was
// exercised. The routing is combinational, so values are checked after a
// short settling delay.
module tb_lb_routing;
  import bsfpga_pkg::*;

  ir_cfg_t cfg;
  logic [4*PINS-1:0] pin_in, pin_out, pin_oe;
  logic [LB_OUT-1:0] d;
  logic [LB_IN-1:0]  lb_in;

  int checks = 0, failures = 0;
  int n_fb = 0, n_bypass = 0;

  lb_routing dut (.cfg, .pin_in, .d, .lb_in, .pin_out, .pin_oe);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic src_val(int unsigned sel, logic [4*PINS-1:0] pi, logic [LB_OUT-1:0] dd);
    if (sel == 0) return 1'b0;
    if (sel == 1) return 1'b1;
    if (sel < 2 + LB_OUT) return dd[sel - 2];
    if (sel < 2 + LB_OUT + 4*PINS) return pi[sel - 2 - LB_OUT];
    return 1'b0;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < LB_IN; i++) cfg.in_sel[i] = IR_SEL_W'($urandom_range(0, IR_NSRC - 1));
      for (int p = 0; p < 4*PINS; p++) cfg.out_sel[p] = IR_SEL_W'($urandom_range(0, IR_NSRC - 1));
      cfg.out_oe = 16'($urandom);
      pin_in = 16'($urandom);
      d      = 6'($urandom);
      #1;
      for (int i = 0; i < LB_IN; i++) begin
        checks++;
        if (lb_in[i] !== src_val(cfg.in_sel[i], pin_in, d)) begin
          failures++;
          $display("lb_in[%0d] sel %0d wrong", i, cfg.in_sel[i]);
        end
        if (cfg.in_sel[i] >= 2 && cfg.in_sel[i] < 8) n_fb++;
      end
      for (int p = 0; p < 4*PINS; p++) begin
        checks++;
        if (pin_out[p] !== src_val(cfg.out_sel[p], pin_in, d) || pin_oe[p] !== cfg.out_oe[p]) begin
          failures++;
          $display("pin %0d sel %0d wrong", p, cfg.out_sel[p]);
        end
        if (cfg.out_sel[p] >= 8) n_bypass++;
      end
    end
    checks++;
    if (n_fb == 0 || n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
