// tb_logic_block: self-checking test of the logic block.
//
// Part 1 builds a bit-serial full adder in half 0 (sum LUT e0, carry LUT e1,
// carry fed back through the carry-save multiplexer) and adds 8-bit numbers
// LSB first, one bit per clock, checking every sum bit against integer
// addition and that a result takes exactly 8 clocks.
// Part 2 drives random configurations and inputs and compares all six
// outputs every clock with a reference model written from the block's
// description (LUT equations, carry-save/5-input multiplexers, flip-flops).
module tb_logic_block;
  import bsfpga_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  lb_cfg_t cfg;
  logic [LB_IN-1:0] lb_in;
  logic [LB_OUT-1:0] d;

  int checks = 0, failures = 0;

  logic_block dut (.clk, .rst_n, .cfg, .lb_in, .d);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth table of a function of {in3,in2,in1,in0}
  function automatic logic [15:0] tt_sum();
    for (int i = 0; i < 16; i++) tt_sum[i] = i[0] ^ i[1] ^ i[3];
  endfunction
  function automatic logic [15:0] tt_carry();
    for (int i = 0; i < 16; i++)
      tt_carry[i] = (i[0] & i[1]) | (i[0] & i[3]) | (i[1] & i[3]);
  endfunction

  // reference model state
  logic [5:0] mq;

  function automatic logic [3:0] model_f(lb_cfg_t c, logic [17:0] in, logic [5:0] q);
    logic [5:0] p;
    logic x0, x1, m, ee, eo;
    logic [3:0] ie, io;
    for (int h = 0; h < 2; h++) begin
      p  = in[6*h +: 6];
      x0 = in[12 + 2 + 2*h];
      x1 = in[12 + 3 + 2*h];
      m  = c.half[h].cs ? q[2*h+1] : x0;
      ie = {m, p[2:0]};
      io = c.half[h].share ? {m, p[2:0]} : {m, p[5:3]};
      ee = c.lut[2*h][ie];
      eo = c.lut[2*h+1][io];
      model_f[2*h]   = (c.half[h].mode5 & x1) ? eo : ee;
      model_f[2*h+1] = eo;
    end
  endfunction

  function automatic logic [5:0] model_d(lb_cfg_t c, logic [17:0] in, logic [5:0] q);
    logic [3:0] f;
    f = model_f(c, in, q);
    for (int i = 0; i < 4; i++) model_d[i] = c.oreg[i] ? q[i] : f[i];
    model_d[4] = q[4];
    model_d[5] = q[5];
  endfunction

  int unsigned a, b, s, cyc0;
  logic [3:0] fnow;

  initial begin
    rst_n = 1'b0;
    cfg   = '0;
    lb_in = '0;
    repeat (2) @(posedge clk);

    // ---------- part 1: bit-serial adder ----------
    cfg.lut[0] = tt_sum();
    cfg.lut[1] = tt_carry();
    cfg.half[0].cs    = 1'b1;
    cfg.half[0].share = 1'b1;
    for (int n = 0; n < 40; n++) begin
      a = $urandom_range(0, 255);
      b = $urandom_range(0, 255);
      s = 0;
      rst_n = 1'b0;              // clear the carry flip-flop between words
      @(negedge clk);
      rst_n = 1'b1;
      cyc0 = 0;
      for (int i = 0; i < 8; i++) begin
        lb_in[0] = a[i];
        lb_in[1] = b[i];
        #1;
        s[i] = d[0];
        @(negedge clk);
        cyc0++;
      end
      checks++;
      if (s != ((a + b) & 32'hff) || cyc0 != 8) begin
        failures++;
        $display("adder: %0d + %0d gave %0d in %0d clocks", a, b, s, cyc0);
      end
      // a ninth bit with zero operands shifts out the final carry
      lb_in[1:0] = 2'b00;
      #1;
      checks++;
      if (32'(d[0]) != ((a + b) >> 8)) begin
        failures++;
        $display("adder: carry out wrong for %0d + %0d", a, b);
      end
    end

    // ---------- part 2: random configurations ----------
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    mq = '0;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) cfg.lut[i] = 16'($urandom);
      cfg.half = 6'($urandom);
      cfg.oreg = 4'($urandom);
      for (int k = 0; k < 10; k++) begin
        lb_in = 18'($urandom);
        #1;
        checks++;
        if (d !== model_d(cfg, lb_in, mq)) begin
          failures++;
          $display("random: d=%b expected %b", d, model_d(cfg, lb_in, mq));
        end
        fnow = model_f(cfg, lb_in, mq);
        @(posedge clk);
        mq = {lb_in[13], lb_in[12], fnow};
        @(negedge clk);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
