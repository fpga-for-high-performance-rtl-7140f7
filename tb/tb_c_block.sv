// tb_c_block: self-checking test of the connection block.
//
// Random configurations and pin/S-block values; every track value and every
// pin input is compared with the selection the configuration asks for
// (track drivers: none, S-block end 0/1, side A or B pin gated by its
// tristate enable; pin inputs: 0, a track, or the facing pin). Direct
// pin-to-pin and pin-through-track paths are both counted. Combinational.
module tb_c_block;
  import bsfpga_pkg::*;

  cb_cfg_t cfg;
  logic [PINS-1:0]  a_out, a_oe, b_out, b_oe, a_in, b_in;
  logic [CHANW-1:0] sb0_drv, sb1_drv, trk, etrk;

  int checks = 0, failures = 0;
  int n_direct = 0, n_track = 0;

  c_block dut (.cfg, .a_out, .a_oe, .b_out, .b_oe, .a_in, .b_in, .sb0_drv, .sb1_drv, .trk);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic tval(int unsigned sel, int t);
    if (sel == 1) return sb0_drv[t];
    if (sel == 2) return sb1_drv[t];
    if (sel >= 3 && sel < 3 + PINS) return a_out[sel-3] & a_oe[sel-3];
    if (sel >= 3 + PINS && sel < 3 + 2*PINS) return b_out[sel-3-PINS] & b_oe[sel-3-PINS];
    return 1'b0;
  endfunction

  function automatic logic pval(int unsigned sel, logic [PINS-1:0] o, logic [PINS-1:0] oe);
    if (sel >= 1 && sel <= CHANW) return etrk[sel-1];
    if (sel > CHANW && sel <= CHANW + PINS) return o[sel-1-CHANW] & oe[sel-1-CHANW];
    return 1'b0;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int t = 0; t < CHANW; t++) cfg.t_sel[t] = CB_TSEL_W'($urandom_range(0, 15));
      for (int p = 0; p < PINS; p++) begin
        cfg.a_sel[p] = CB_PSEL_W'($urandom_range(0, 15));
        cfg.b_sel[p] = CB_PSEL_W'($urandom_range(0, 15));
      end
      a_out = PINS'($urandom); a_oe = PINS'($urandom);
      b_out = PINS'($urandom); b_oe = PINS'($urandom);
      sb0_drv = CHANW'($urandom); sb1_drv = CHANW'($urandom);
      #1;
      for (int t = 0; t < CHANW; t++) etrk[t] = tval(cfg.t_sel[t], t);
      checks++;
      if (trk !== etrk) begin
        failures++;
        $display("trk %b expected %b", trk, etrk);
      end
      for (int p = 0; p < PINS; p++) begin
        checks += 2;
        if (a_in[p] !== pval(cfg.a_sel[p], b_out, b_oe)) begin
          failures++; $display("a_in[%0d] sel %0d wrong", p, cfg.a_sel[p]);
        end
        if (b_in[p] !== pval(cfg.b_sel[p], a_out, a_oe)) begin
          failures++; $display("b_in[%0d] sel %0d wrong", p, cfg.b_sel[p]);
        end
        if (cfg.a_sel[p] > CHANW && cfg.a_sel[p] <= CHANW + PINS) n_direct++;
        if (cfg.a_sel[p] >= 1 && cfg.a_sel[p] <= CHANW) n_track++;
      end
    end
    checks++;
    if (n_direct == 0 || n_track == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
