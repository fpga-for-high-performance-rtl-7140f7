// tb_workload_mult: bit-serial multipliers filling the whole array.
//
// Six serial-parallel multipliers run at once on the 64 logic blocks:
// four 8-bit multipliers in rows 0..3 (8 blocks each) and two 16-bit
// multipliers in rows 4-5 and 6-7 (16 blocks each, snaking back along the
// second row). Every logic block is one multiplier cell:
//   * half 1 holds the cell's bit of the parallel operand A in flip-flop q3:
//     LUT e3 = load ? (bit from the next cell) : q3, with q3 fed back through
//     the carry-save multiplexer, so A is shifted in serially through a
//     chain of direct C-block connections while load is high;
//   * half 0 is a full adder of (A_j AND x), the partial sum arriving from
//     the next cell and its own carry (carry-save multiplexer). A_j comes from
//     q3 through the internal feedback connections; the registered sum goes
//     to the previous cell, and cell 0's sum is the product, LSB first.
// The serial operand x (broadcast east along each row channel over track 0)
// is fed for N clocks, then N zeros while the next A is shifted in with load
// (broadcast west over track 1). A product of 2N bits therefore leaves every
// 2N clocks; after the zeros every sum and carry is back at 0, so no
// word-start flag is needed. Each product is compared with integer
// multiplication and the 2N-clock spacing is checked.
module tb_workload_mult;
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

  localparam int NPROD = 12;   // products per multiplier

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic logic [IR_SEL_W-1:0] pin_src(side_e s, int p);
    return IR_SEL_W'(2 + LB_OUT + int'(s) * PINS + p);
  endfunction
  function automatic int pin_idx(side_e s, int p);
    return int'(s) * PINS + p;
  endfunction

  localparam io_cfg_t IO_IN  = '{out_en: 1'b0, reg_en: 1'b0};
  localparam io_cfg_t IO_OUT = '{out_en: 1'b1, reg_en: 1'b0};

  tile_cfg_t tcfg [ARRAY_X][ARRAY_Y];
  cb_cfg_t   hc [ARRAY_X][ARRAY_Y+1];
  cb_cfg_t   vc [ARRAY_X+1][ARRAY_Y];
  sb_cfg_t   sb [ARRAY_X+1][ARRAY_Y+1];
  io_cfg_t   io [4][IO_PER_SIDE];

  // Multipliers: first row and number of rows (N = 8 * rows).
  localparam int NMUL = 6;
  localparam int R0   [NMUL] = '{0, 1, 2, 3, 4, 6};
  localparam int NROW [NMUL] = '{1, 1, 1, 1, 2, 2};

  // position of cell j of a multiplier starting at row r0
  function automatic int cell_x(int j);
    return ((j / 8) % 2 == 0) ? (j % 8) : (7 - j % 8);
  endfunction

  // the side of cell j that faces cell j+1 (or the pads, for the last cell)
  function automatic side_e next_side_of(int j, int n);
    if (j == n - 1) return ((j / 8) % 2 == 0) ? SIDE_E : SIDE_W;
    if (j % 8 == 7) return SIDE_N;
    return ((j / 8) % 2 == 0) ? SIDE_E : SIDE_W;
  endfunction
  // the side of cell j that faces cell j-1 (or the output pad, for cell 0)
  function automatic side_e prev_side_of(int j);
    if (j == 0)     return SIDE_W;
    if (j % 8 == 0) return SIDE_S;
    return ((j / 8) % 2 == 0) ? SIDE_W : SIDE_E;
  endfunction

  // make input pin p of side s of tile (x,y) take the facing pin p directly
  task automatic direct_in(int x, int y, side_e s, int p);
    logic [CB_PSEL_W-1:0] d = CB_PSEL_W'(1 + CHANW + p);
    case (s)
      SIDE_W: vc[x][y].a_sel[p]   = d;
      SIDE_E: vc[x+1][y].b_sel[p] = d;
      SIDE_S: hc[x][y].a_sel[p]   = d;
      SIDE_N: hc[x][y+1].b_sel[p] = d;
      default: ;
    endcase
  endtask

  task automatic configure();
    for (int x = 0; x < ARRAY_X; x++) for (int y = 0; y < ARRAY_Y; y++) tcfg[x][y] = '0;
    for (int x = 0; x < ARRAY_X; x++) for (int j = 0; j <= ARRAY_Y; j++) hc[x][j] = '0;
    for (int i = 0; i <= ARRAY_X; i++) for (int y = 0; y < ARRAY_Y; y++) vc[i][y] = '0;
    for (int i = 0; i <= ARRAY_X; i++) for (int j = 0; j <= ARRAY_Y; j++) sb[i][j] = '0;
    for (int s = 0; s < 4; s++) for (int k = 0; k < IO_PER_SIDE; k++) io[s][k] = IO_IN;

    for (int m = 0; m < NMUL; m++) begin
      int r0 = R0[m];
      int n  = 8 * NROW[m];
      // x: west pad 2*r0+1 -> vertical channel 0, track 0 -> east along each row
      vc[0][r0].t_sel[0] = CB_TSEL_W'(3 + PINS + 1);
      // load: east pad 2*r0 -> vertical channel 8, track 1 -> west along each row
      vc[ARRAY_X][r0].t_sel[1] = CB_TSEL_W'(3 + 0);
      for (int r = 0; r < NROW[m]; r++) begin
        int y = r0 + r;
        sb[0][y].sel[SIDE_E][0]       = (r == 0) ? 2'd3 : 2'd1;  // from N / from S
        sb[ARRAY_X][y].sel[SIDE_W][1] = (r == 0) ? 2'd1 : 2'd3;  // from N / from S
        for (int i = 1; i < ARRAY_X; i++) begin
          sb[i][y].sel[SIDE_E][0] = 2'd2;                          // E <- W
          sb[i][y].sel[SIDE_W][1] = 2'd2;                          // W <- E
        end
        for (int x = 0; x < ARRAY_X; x++) begin
          hc[x][y].t_sel[0] = CB_TSEL_W'(1);                       // from west S-block
          hc[x][y].t_sel[1] = CB_TSEL_W'(2);                       // from east S-block
          hc[x][y].a_sel[2] = CB_PSEL_W'(1 + 0);                   // S pin 2 <- x
          hc[x][y].a_sel[3] = CB_PSEL_W'(1 + 1);                   // S pin 3 <- load
        end
      end
      io[SIDE_W][2*r0]     = IO_OUT;   // product

      for (int j = 0; j < n; j++) begin
        int x = cell_x(j);
        int y = r0 + j / 8;
        side_e ns = next_side_of(j, n);
        side_e ps = prev_side_of(j);
        tile_cfg_t t = '0;
        for (int i = 0; i < 16; i++) begin
          logic pp;
          pp = i[0] & i[1];
          t.lb.lut[0][i] = pp ^ i[2] ^ i[3];
          t.lb.lut[1][i] = (pp & i[2]) | (pp & i[3]) | (i[2] & i[3]);
          t.lb.lut[3][i] = i[1] ? i[0] : i[3];     // {m=q3, b5, b4=load, b3=shift in}
        end
        t.lb.half[0].cs    = 1'b1;
        t.lb.half[0].share = 1'b1;
        t.lb.half[1].cs    = 1'b1;
        t.lb.oreg[0] = 1'b1;
        t.lb.oreg[3] = 1'b1;
        t.ir.in_sel[0]  = IR_SEL_W'(2 + 3);                      // a0 <- d3 = A_j
        t.ir.in_sel[1]  = pin_src(SIDE_S, 2);                    // a1 <- x
        t.ir.in_sel[2]  = (j == n - 1) ? IR_SEL_W'(0) : pin_src(ns, 0); // partial sum in
        t.ir.in_sel[9]  = pin_src(ns, 1);                        // b3 <- A shift in
        t.ir.in_sel[10] = pin_src(SIDE_S, 3);                    // b4 <- load
        t.ir.out_sel[pin_idx(ps, 0)] = IR_SEL_W'(2 + 0);         // sum out
        t.ir.out_oe[pin_idx(ps, 0)]  = 1'b1;
        t.ir.out_sel[pin_idx(ps, 1)] = IR_SEL_W'(2 + 3);         // A shift out
        t.ir.out_oe[pin_idx(ps, 1)]  = 1'b1;
        tcfg[x][y] = t;
        if (j != n - 1) direct_in(x, y, ns, 0);
        direct_in(x, y, ns, 1);
      end
      direct_in(-1, r0, SIDE_E, 0);   // product: west IO of row r0 <- tile (0,r0) W pin 0
    end

    for (int x = 0; x < ARRAY_X; x++) for (int y = 0; y < ARRAY_Y; y++)
      cfg_write(ID_TILE + ARRAY_X * y + x, 512'(tcfg[x][y]), TILE_CFG_BITS);
    for (int x = 0; x < ARRAY_X; x++) for (int j = 0; j <= ARRAY_Y; j++)
      cfg_write(ID_HCB + ARRAY_X * j + x, 512'(hc[x][j]), CB_CFG_BITS);
    for (int i = 0; i <= ARRAY_X; i++) for (int y = 0; y < ARRAY_Y; y++)
      cfg_write(ID_VCB + ARRAY_Y * i + y, 512'(vc[i][y]), CB_CFG_BITS);
    for (int i = 0; i <= ARRAY_X; i++) for (int j = 0; j <= ARRAY_Y; j++)
      cfg_write(ID_SB + (ARRAY_X + 1) * j + i, 512'(sb[i][j]), SB_CFG_BITS);
    for (int s = 0; s < 4; s++) for (int k = 0; k < IO_PER_SIDE; k++)
      cfg_write(ID_IO + IO_PER_SIDE * s + k, 512'(io[s][k]), IO_CFG_BITS);
  endtask

  // pad of the serial A input of multiplier m
  function automatic int a_pad_side(int m);
    return (NROW[m] % 2 == 1) ? int'(SIDE_E) : int'(SIDE_W);
  endfunction
  function automatic int a_pad_k(int m);
    return 2 * (R0[m] + NROW[m] - 1) + 1;
  endfunction

  int done = 0;
  int products [NMUL];

  task automatic run_mul(int m);
    int n = 8 * NROW[m];
    int r0 = R0[m];
    longint unsigned a, b, nxt_a, got, t0;
    a = 0;
    // shift in the first A (a[0] first; it travels furthest, to cell 0)
    nxt_a = (n == 8) ? longint'($urandom_range(0, 255)) : longint'($urandom_range(0, 65535));
    for (int i = 0; i < n; i++) begin
      pad_in[SIDE_E][2*r0]           = 1'b1;        // load
      pad_in[SIDE_W][2*r0+1]         = 1'b0;        // x
      pad_in[a_pad_side(m)][a_pad_k(m)] = nxt_a[i];
      @(negedge clk);
    end
    for (int p = 0; p < NPROD; p++) begin
      a = nxt_a;
      b = (n == 8) ? longint'($urandom_range(0, 255)) : longint'($urandom_range(0, 65535));
      if (p == 0) b = (n == 8) ? 255 : 65535;
      nxt_a = (n == 8) ? longint'($urandom_range(0, 255)) : longint'($urandom_range(0, 65535));
      if (p == NPROD - 2) nxt_a = (n == 8) ? 255 : 65535;
      got = 0;
      t0 = $time / 10;
      for (int t = 0; t < 2 * n; t++) begin
        pad_in[SIDE_W][2*r0+1]         = (t < n) ? b[t] : 1'b0;
        pad_in[SIDE_E][2*r0]           = (t >= n);
        pad_in[a_pad_side(m)][a_pad_k(m)] = (t >= n) ? nxt_a[t - n] : 1'b0;
        @(negedge clk);
        got[t] = pad_out[SIDE_W][2*r0];
      end
      checks += 2;
      if (got != a * b) begin
        failures++;
        $display("mul %0d (%0d-bit): %0d * %0d gave %0d", m, n, a, b, got);
      end
      if ($time / 10 - t0 != longint'(2 * n)) begin
        failures++;
        $display("mul %0d: product took %0d clocks", m, $time / 10 - t0);
      end
      products[m]++;
    end
    done++;
  endtask

  initial begin
    cfg_we = 1'b0; cfg_blk = '0; cfg_word = '0; cfg_wdata = '0;
    pad_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();
    for (int m = 0; m < NMUL; m++) begin
      automatic int mm = m;
      products[mm] = 0;
      fork
        run_mul(mm);
      join_none
    end
    wait (done == NMUL);
    for (int m = 0; m < NMUL; m++)
      $display("multiplier %0d: %0d-bit, %0d products checked", m, 8 * NROW[m], products[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
