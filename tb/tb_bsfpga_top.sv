// tb_bsfpga_top: end-to-end test of the whole bit-serial FPGA at its default
// size (8x8 logic blocks, 64 IO blocks), driven only through its ports.
//
// The testbench loads a configuration over the configuration bus and then
// streams data through three small circuits placed in the bottom-left
// corner of the array:
//   1. tile (0,0): a bit-serial 8-bit adder. Operand a enters on west pad 0
//      through a direct C-block pin-to-pin connection, operand b on west pad 1
//      through a channel track, and the word-start flag on west pad 2 through
//      a track of the next channel segment and an S-block. Sum LUT e0 and
//      carry LUT e1 share their inputs; the carry returns through the
//      carry-save multiplexer; the sum leaves registered on south pad 0.
//   2. tile (1,0): reads the sum from its neighbour through a direct C-block
//      connection and keeps a running parity of it with a 5-input-function
//      multiplexer steered by its own output (internal feedback); the parity
//      leaves on south pad 2.
//   3. a bypass path: west pad 0 is passed through the output networks of
//      tiles (0,0) and (1,0) without using a LUT and leaves on south pad 3
//      through a registered IO block.
// Words are streamed back to back, LSB first, one bit per clock, so a new
// 8-bit sum completes every 8 clocks; the testbench checks every output bit
// against integer arithmetic and counts how often each mechanism was used.
module tb_bsfpga_top;
  import bsfpga_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;   // held from time 0 so the fabric powers up quiet
  logic cfg_we;
  logic [CFG_BW-1:0] cfg_blk;
  logic [CFG_AW-1:0] cfg_word;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [3:0][IO_PER_SIDE-1:0] pad_in, pad_out, pad_oe;

  int checks = 0, failures = 0;

  bsfpga_top dut (.clk, .rst_n, .cfg_we, .cfg_blk, .cfg_word, .cfg_wdata,
                  .pad_in, .pad_out, .pad_oe);

  always #5 clk = ~clk;

  localparam int NWORDS = 200;

  initial begin : watchdog
    repeat (NWORDS * 8 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- configuration helpers ----------------
  task automatic cfg_write(int unsigned id, logic [511:0] bits, int unsigned nbits);
    for (int w = 0; w * CFG_DW < nbits; w++) begin
      @(negedge clk);
      cfg_we    = 1'b1;
      cfg_blk   = CFG_BW'(id);
      cfg_word  = CFG_AW'(w);
      cfg_wdata = bits[w*CFG_DW +: CFG_DW];
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int unsigned pin_src(side_e s, int p);  // IR source of a pin input
    return 2 + LB_OUT + int'(s) * PINS + p;
  endfunction
  function automatic int unsigned pin_idx(side_e s, int p);  // side-major pin index
    return int'(s) * PINS + p;
  endfunction

  // sum  = p0 ^ p1 ^ (p2 ? 0 : m);  carry = p2 ? p0&p1 : maj(p0,p1,m)
  // p2 is the word-start flag, m the carry fed back through the carry-save mux
  function automatic logic [15:0] tt_sum();
    for (int i = 0; i < 16; i++) tt_sum[i] = i[0] ^ i[1] ^ (i[2] ? 1'b0 : i[3]);
  endfunction
  function automatic logic [15:0] tt_carry();
    for (int i = 0; i < 16; i++)
      tt_carry[i] = i[2] ? (i[0] & i[1]) : ((i[0] & i[1]) | (i[0] & i[3]) | (i[1] & i[3]));
  endfunction

  tile_cfg_t t00, t10;
  cb_cfg_t   vc00, vc01, vc10, hc00, hc10;
  sb_cfg_t   sb01;
  io_cfg_t   io_in, io_out, io_out_reg;

  task automatic configure();
    // tile (0,0): bit-serial adder
    t00 = '0;
    t00.lb.lut[0] = tt_sum();
    t00.lb.lut[1] = tt_carry();
    t00.lb.half[0].cs    = 1'b1;
    t00.lb.half[0].share = 1'b1;
    t00.lb.oreg[0]       = 1'b1;
    t00.ir.in_sel[0] = IR_SEL_W'(pin_src(SIDE_W, 0));      // a0 <- operand a
    t00.ir.in_sel[1] = IR_SEL_W'(pin_src(SIDE_W, 1));      // a1 <- operand b
    t00.ir.in_sel[2] = IR_SEL_W'(pin_src(SIDE_W, 2));      // a2 <- word start
    t00.ir.out_sel[pin_idx(SIDE_S, 0)] = IR_SEL_W'(2 + 0); // S0 <- d0 (sum)
    t00.ir.out_oe[pin_idx(SIDE_S, 0)]  = 1'b1;
    t00.ir.out_sel[pin_idx(SIDE_E, 0)] = IR_SEL_W'(2 + 0); // E0 <- d0 (sum)
    t00.ir.out_oe[pin_idx(SIDE_E, 0)]  = 1'b1;
    t00.ir.out_sel[pin_idx(SIDE_E, 1)] = IR_SEL_W'(pin_src(SIDE_W, 0)); // bypass
    t00.ir.out_oe[pin_idx(SIDE_E, 1)]  = 1'b1;

    // tile (1,0): running parity, f0 = q0 ? ~p0 : p0 via the 5-input mux
    t10 = '0;
    for (int i = 0; i < 16; i++) begin
      t10.lb.lut[0][i] = i[0];
      t10.lb.lut[1][i] = ~i[0];
    end
    t10.lb.half[0].share = 1'b1;
    t10.lb.half[0].mode5 = 1'b1;
    t10.lb.oreg[0]       = 1'b1;
    t10.ir.in_sel[0]  = IR_SEL_W'(pin_src(SIDE_W, 0));     // a0 <- neighbour's sum
    t10.ir.in_sel[15] = IR_SEL_W'(2 + 0);                  // c3 <- own d0 (feedback)
    t10.ir.out_sel[pin_idx(SIDE_S, 0)] = IR_SEL_W'(2 + 0);
    t10.ir.out_oe[pin_idx(SIDE_S, 0)]  = 1'b1;
    t10.ir.out_sel[pin_idx(SIDE_S, 1)] = IR_SEL_W'(pin_src(SIDE_W, 1)); // bypass
    t10.ir.out_oe[pin_idx(SIDE_S, 1)]  = 1'b1;

    // VC(0,0): west IO (side B) to tile (0,0) W pins (side A)
    vc00 = '0;
    vc00.a_sel[0] = CB_PSEL_W'(1 + CHANW + 0);   // direct from IO pin 0
    vc00.t_sel[0] = CB_TSEL_W'(3 + PINS + 1);    // track 0 <- IO pin 1
    vc00.a_sel[1] = CB_PSEL_W'(1 + 0);           // from track 0
    vc00.t_sel[1] = CB_TSEL_W'(2);               // track 1 <- S-block (0,1)
    vc00.a_sel[2] = CB_PSEL_W'(1 + 1);           // from track 1
    // VC(0,1): west IO pad 2 (its side B pin 0) onto track 1
    vc01 = '0;
    vc01.t_sel[1] = CB_TSEL_W'(3 + PINS + 0);
    // S-block (0,1): track 1 turns from the north segment to the south one
    sb01 = '0;
    sb01.sel[SIDE_S][1] = 2'd2;                  // (S + 2) % 4 = N
    // VC(1,0): tile (0,0) E pins (side B) to tile (1,0) W pins (side A)
    vc10 = '0;
    vc10.a_sel[0] = CB_PSEL_W'(1 + CHANW + 0);
    vc10.a_sel[1] = CB_PSEL_W'(1 + CHANW + 1);
    // HC(0,0), HC(1,0): tile S pins (side A) to south IO blocks (side B)
    hc00 = '0;
    hc00.b_sel[0] = CB_PSEL_W'(1 + CHANW + 0);
    hc10 = '0;
    hc10.b_sel[0] = CB_PSEL_W'(1 + CHANW + 0);
    hc10.b_sel[1] = CB_PSEL_W'(1 + CHANW + 1);

    io_in      = '{out_en: 1'b0, reg_en: 1'b0};
    io_out     = '{out_en: 1'b1, reg_en: 1'b0};
    io_out_reg = '{out_en: 1'b1, reg_en: 1'b1};

    cfg_write(ID_TILE + 0, 512'(t00), TILE_CFG_BITS);
    cfg_write(ID_TILE + 1, 512'(t10), TILE_CFG_BITS);
    cfg_write(ID_VCB + ARRAY_Y * 0 + 0, 512'(vc00), CB_CFG_BITS);
    cfg_write(ID_VCB + ARRAY_Y * 0 + 1, 512'(vc01), CB_CFG_BITS);
    cfg_write(ID_VCB + ARRAY_Y * 1 + 0, 512'(vc10), CB_CFG_BITS);
    cfg_write(ID_HCB + 0, 512'(hc00), CB_CFG_BITS);
    cfg_write(ID_HCB + 1, 512'(hc10), CB_CFG_BITS);
    cfg_write(ID_SB + (ARRAY_X + 1) * 1 + 0, 512'(sb01), SB_CFG_BITS);
    for (int k = 0; k < 3; k++)
      cfg_write(ID_IO + IO_PER_SIDE * int'(SIDE_W) + k, 512'(io_in), IO_CFG_BITS);
    cfg_write(ID_IO + IO_PER_SIDE * int'(SIDE_S) + 0, 512'(io_out), IO_CFG_BITS);
    cfg_write(ID_IO + IO_PER_SIDE * int'(SIDE_S) + 2, 512'(io_out), IO_CFG_BITS);
    cfg_write(ID_IO + IO_PER_SIDE * int'(SIDE_S) + 3, 512'(io_out_reg), IO_CFG_BITS);
  endtask

  // ---------------- mechanism counters ----------------
  int n_carry_fb = 0;    // carry-save feedback carried a 1 into a bit
  int n_first    = 0;    // word-start flag (track + S-block route) cleared a carry
  int n_mode5    = 0;    // 5-input mux chose the odd LUT
  int n_bypass   = 0;    // bypass path carried a 1
  int n_ioreg    = 0;    // registered IO block held a value across a clock
  int n_results  = 0;

  int unsigned a, b, got, t_start;
  int unsigned carry = 0;
  logic exp_sreg, prev_sreg, exp_par, prev_a, bit_a, bit_b;

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_blk = '0; cfg_word = '0; cfg_wdata = '0;
    pad_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();

    // pad directions follow the IO block configuration
    checks++;
    if (pad_oe[SIDE_S][0] !== 1'b1 || pad_oe[SIDE_W][0] !== 1'b0) begin
      failures++; $display("pad directions wrong");
    end

    // flush: run one all-zero word so every register holds a known value
    for (int i = 0; i < 8; i++) begin
      pad_in[SIDE_W][2:0] = {i == 0, 2'b00};
      @(negedge clk);
    end
    exp_par = pad_out[SIDE_S][2];
    prev_sreg = pad_out[SIDE_S][0];
    prev_a = 1'b0;

    for (int w = 0; w < NWORDS; w++) begin
      a = $urandom_range(0, 255);
      b = $urandom_range(0, 255);
      if (w % 7 == 0) begin a = 255; b = 1; end     // full carry ripple
      got = 0;   // carry keeps the previous word's carry out
      t_start = int'($time / 10);
      for (int i = 0; i < 8; i++) begin
        bit_a = a[i]; bit_b = b[i];
        pad_in[SIDE_W][0] = bit_a;
        pad_in[SIDE_W][1] = bit_b;
        pad_in[SIDE_W][2] = (i == 0);
        if (i == 0 && carry != 0) n_first++;
        if (i > 0 && carry != 0) n_carry_fb++;
        exp_sreg = bit_a ^ bit_b ^ carry[0];
        carry = (32'(bit_a) + 32'(bit_b) + (i == 0 ? 0 : carry)) >> 1;
        if (i == 0) exp_sreg = bit_a ^ bit_b;
        // bypass path, combinational up to the registered IO block
        @(negedge clk);
        // after the edge: registered sum, parity and bypassed bit
        got[i] = pad_out[SIDE_S][0];
        if (prev_sreg) n_mode5++;
        exp_par = exp_par ^ prev_sreg;
        checks += 3;
        if (pad_out[SIDE_S][0] !== exp_sreg) begin
          failures++; $display("word %0d bit %0d: sum %b expected %b", w, i, pad_out[SIDE_S][0], exp_sreg);
        end
        if (pad_out[SIDE_S][2] !== exp_par) begin
          failures++; $display("word %0d bit %0d: parity wrong", w, i);
        end
        if (pad_out[SIDE_S][3] !== bit_a) begin
          failures++; $display("word %0d bit %0d: bypass wrong", w, i);
        end
        if (bit_a) n_bypass++;
        if (bit_a != prev_a) n_ioreg++;
        prev_a = bit_a;
        prev_sreg = pad_out[SIDE_S][0];
      end
      checks += 2;
      if (got != ((a + b) & 32'hff)) begin
        failures++; $display("word %0d: %0d + %0d gave %0d", w, a, b, got);
      end
      if (int'($time / 10) - t_start != 8) begin
        failures++; $display("word %0d took %0d clocks", w, int'($time / 10) - t_start);
      end
      n_results++;
    end

    $display("results=%0d carry_feedback=%0d word_start=%0d mode5=%0d bypass=%0d io_reg=%0d",
             n_results, n_carry_fb, n_first, n_mode5, n_bypass, n_ioreg);
    checks += 5;
    if (n_carry_fb == 0) begin failures++; $display("carry feedback never used"); end
    if (n_first == 0)    begin failures++; $display("word start never cleared a carry"); end
    if (n_mode5 == 0)    begin failures++; $display("5-input mux never switched"); end
    if (n_bypass == 0)   begin failures++; $display("bypass never used"); end
    if (n_ioreg == 0)    begin failures++; $display("registered IO never toggled"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
