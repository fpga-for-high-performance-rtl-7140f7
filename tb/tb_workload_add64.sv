// tb_workload_add64: all 64 logic blocks as bit-serial adders at once.
//
// Every logic block of the 8x8 array is configured as a bit-serial adder
// (sum LUT e0, carry LUT e1, carry held in the block through the carry-save
// multiplexer). The adders form one serpentine chain: row 0 left to right,
// row 1 right to left, and so on, each adder passing its sum to the next
// through a direct C-block pin connection. Every adder adds the same operand
// b, which, with the word-start flag, is broadcast to all 64 blocks over
// tracks 0 and 1: up vertical channel 0 through the S-blocks, turned east
// into every horizontal channel, and straight on through the S-blocks of
// that channel. The chain result, read on west pad 14, is a + 64*b.
//
// Each adder completes one addition per word, so the array completes 64
// additions every W clocks (W = 8 and W = 16 are both run, back to back and
// without reconfiguration). The testbench checks every result word and the
// W-clock spacing of results. Sums are combinational (unregistered) so the
// whole chain works on the same bit in the same clock.
module tb_workload_add64;
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

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  localparam logic [CB_PSEL_W-1:0] CB_DIRECT0 = CB_PSEL_W'(1 + CHANW);  // facing pin 0

  localparam io_cfg_t IO_IN  = '{out_en: 1'b0, reg_en: 1'b0};
  localparam io_cfg_t IO_OUT = '{out_en: 1'b1, reg_en: 1'b0};

  tile_cfg_t tc;
  cb_cfg_t   hc [ARRAY_X][ARRAY_Y+1];
  cb_cfg_t   vc [ARRAY_X+1][ARRAY_Y];
  sb_cfg_t   sb [ARRAY_X+1][ARRAY_Y+1];

  task automatic configure();
    side_e in_side, out_side;
    for (int x = 0; x < ARRAY_X; x++) for (int j = 0; j <= ARRAY_Y; j++) hc[x][j] = '0;
    for (int i = 0; i <= ARRAY_X; i++) for (int y = 0; y < ARRAY_Y; y++) vc[i][y] = '0;
    for (int i = 0; i <= ARRAY_X; i++) for (int j = 0; j <= ARRAY_Y; j++) sb[i][j] = '0;

    // ---- broadcast of b (track 0) and word-start flag (track 1) ----
    vc[0][0].t_sel[0] = CB_TSEL_W'(3 + PINS + 1);   // west pad 1 -> track 0
    vc[0][1].t_sel[1] = CB_TSEL_W'(3 + PINS + 0);   // west pad 2 -> track 1
    vc[0][0].t_sel[1] = CB_TSEL_W'(2);              // flag down from S-block (0,1)
    sb[0][1].sel[SIDE_S][1] = 2'd2;                 // S side <- N side
    for (int y = 1; y < ARRAY_Y; y++) begin
      vc[0][y].t_sel[0] = CB_TSEL_W'(1);            // b up from S-block (0,y)
      sb[0][y].sel[SIDE_N][0] = 2'd2;               // N side <- S side
      if (y >= 2) begin
        vc[0][y].t_sel[1] = CB_TSEL_W'(1);
        sb[0][y].sel[SIDE_N][1] = 2'd2;
      end
    end
    for (int j = 0; j < ARRAY_Y; j++) begin
      for (int t = 0; t < 2; t++) begin
        sb[0][j].sel[SIDE_E][t] = 2'd3;             // E side <- N side (turn)
        for (int i = 1; i < ARRAY_X; i++) sb[i][j].sel[SIDE_E][t] = 2'd2; // E <- W
        for (int x = 0; x < ARRAY_X; x++) hc[x][j].t_sel[t] = CB_TSEL_W'(1);
      end
      for (int x = 0; x < ARRAY_X; x++) begin
        hc[x][j].a_sel[1] = CB_PSEL_W'(1 + 0);      // tile S pin 1 <- track 0 (b)
        hc[x][j].a_sel[2] = CB_PSEL_W'(1 + 1);      // tile S pin 2 <- track 1 (flag)
      end
    end

    // ---- serpentine adder chain ----
    for (int y = 0; y < ARRAY_Y; y++) begin
      for (int x = 0; x < ARRAY_X; x++) begin
        bit even = (y % 2 == 0);
        // where the chain enters this tile
        if (x == 0 && y == 0)                 in_side = SIDE_W;
        else if (even ? (x == 0) : (x == 7))  in_side = SIDE_S;
        else                                  in_side = even ? SIDE_W : SIDE_E;
        // where it leaves
        if (even ? (x == 7) : (x == 0))       out_side = (y == ARRAY_Y - 1) ? SIDE_W : SIDE_N;
        else                                  out_side = even ? SIDE_E : SIDE_W;

        tc = '0;
        for (int i = 0; i < 16; i++) begin
          tc.lb.lut[0][i] = i[0] ^ i[1] ^ (i[2] ? 1'b0 : i[3]);
          tc.lb.lut[1][i] = i[2] ? (i[0] & i[1])
                                 : ((i[0] & i[1]) | (i[0] & i[3]) | (i[1] & i[3]));
        end
        tc.lb.half[0].cs    = 1'b1;
        tc.lb.half[0].share = 1'b1;
        tc.ir.in_sel[0] = pin_src(in_side, 0);
        tc.ir.in_sel[1] = pin_src(SIDE_S, 1);
        tc.ir.in_sel[2] = pin_src(SIDE_S, 2);
        tc.ir.out_sel[pin_idx(out_side, 0)] = IR_SEL_W'(2);   // d0
        tc.ir.out_oe[pin_idx(out_side, 0)]  = 1'b1;
        cfg_write(ID_TILE + ARRAY_X * y + x, 512'(tc), TILE_CFG_BITS);

        // C-block that carries the chain into this tile, pin 0 to pin 0
        case (in_side)
          SIDE_W: vc[x][y].a_sel[0]   = CB_DIRECT0;   // from tile x-1 or west pad 0
          SIDE_E: vc[x+1][y].b_sel[0] = CB_DIRECT0;   // from tile x+1
          SIDE_S: hc[x][y].a_sel[0]   = CB_DIRECT0;   // from tile (x,y-1)
          default: ;
        endcase
        if (x == 0 && y == ARRAY_Y - 1) vc[0][y].b_sel[0] = CB_DIRECT0;  // to west pad 14
      end
    end

    for (int x = 0; x < ARRAY_X; x++) for (int j = 0; j <= ARRAY_Y; j++)
      cfg_write(ID_HCB + ARRAY_X * j + x, 512'(hc[x][j]), CB_CFG_BITS);
    for (int i = 0; i <= ARRAY_X; i++) for (int y = 0; y < ARRAY_Y; y++)
      cfg_write(ID_VCB + ARRAY_Y * i + y, 512'(vc[i][y]), CB_CFG_BITS);
    for (int i = 0; i <= ARRAY_X; i++) for (int j = 0; j <= ARRAY_Y; j++)
      cfg_write(ID_SB + (ARRAY_X + 1) * j + i, 512'(sb[i][j]), SB_CFG_BITS);
    for (int k = 0; k < 3; k++)
      cfg_write(ID_IO + IO_PER_SIDE * int'(SIDE_W) + k, 512'(IO_IN), IO_CFG_BITS);
    cfg_write(ID_IO + IO_PER_SIDE * int'(SIDE_W) + 14, 512'(IO_OUT), IO_CFG_BITS);
  endtask

  int unsigned a, b, got, expv, t_start, width, n_words;

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_blk = '0; cfg_word = '0; cfg_wdata = '0;
    pad_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();

    for (int pass = 0; pass < 2; pass++) begin
      width = (pass == 0) ? 8 : 16;
      n_words = 0;
      for (int w = 0; w < 40; w++) begin
        a = $urandom_range(0, (1 << width) - 1);
        b = $urandom_range(0, (1 << width) - 1);
        if (w == 0) begin a = (1 << width) - 1; b = (1 << width) - 1; end
        got = 0;
        t_start = int'($time / 10);
        for (int i = 0; i < width; i++) begin
          pad_in[SIDE_W][0] = a[i];
          pad_in[SIDE_W][1] = b[i];
          pad_in[SIDE_W][2] = (i == 0);
          #2;
          got[i] = pad_out[SIDE_W][14];
          @(negedge clk);
        end
        expv = (a + 64 * b) & ((1 << width) - 1);
        checks += 2;
        if (got != expv) begin
          failures++; $display("W=%0d word %0d: %0d + 64*%0d gave %0d expected %0d", width, w, a, b, got, expv);
        end
        if (int'($time / 10) - t_start != width) begin
          failures++; $display("W=%0d word %0d took %0d clocks", width, w, int'($time / 10) - t_start);
        end
        n_words++;
      end
      $display("W=%0d: %0d chained results, %0d additions, one result per %0d clocks",
               width, n_words, 64 * n_words, width);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
