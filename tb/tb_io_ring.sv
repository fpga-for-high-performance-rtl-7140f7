// tb_io_ring: checks the IO ring geometry of the whole chip.
//
// On every chip side, each of the 8 edge C-blocks serves two IO blocks. For
// each pair, the even pad (k = 2c) is configured as an input and the odd pad
// (k = 2c+1) as an output. The input reaches pin 0 of the facing edge logic
// block through a direct C-block connection; that block's internal routing
// bypasses it to pin 1 on the same side, and the C-block connects pin 1 back
// to the odd IO block. Half of the outputs are registered. Random data on all
// 32 input pads must appear on the matching 32 output pads, with the right
// latency and output enables, which proves that all 64 IO blocks, all 32
// edge C-blocks and the pad numbering are wired as documented.
module tb_io_ring;
  import bsfpga_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;   // held from time 0 so the fabric powers up quiet
  logic cfg_we;
  logic [CFG_BW-1:0] cfg_blk;
  logic [CFG_AW-1:0] cfg_word;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [3:0][IO_PER_SIDE-1:0] pad_in, pad_out, pad_oe, prev_in;

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

  localparam io_cfg_t IO_IN      = '{out_en: 1'b0, reg_en: 1'b0};
  localparam io_cfg_t IO_OUT     = '{out_en: 1'b1, reg_en: 1'b0};
  localparam io_cfg_t IO_OUT_REG = '{out_en: 1'b1, reg_en: 1'b1};
  localparam logic [CB_PSEL_W-1:0] DIRECT0 = CB_PSEL_W'(1 + CHANW + 0);
  localparam logic [CB_PSEL_W-1:0] DIRECT1 = CB_PSEL_W'(1 + CHANW + 1);

  tile_cfg_t tcfg [ARRAY_X][ARRAY_Y];

  function automatic bit is_reg(int s, int c);
    return ((s + c) % 2) == 1;
  endfunction

  task automatic configure();
    cb_cfg_t cb;
    int tx, ty;
    for (int x = 0; x < ARRAY_X; x++) for (int y = 0; y < ARRAY_Y; y++) tcfg[x][y] = '0;
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < ARRAY_X; c++) begin
        // edge tile facing side s at position c, and its C-block
        cb = '0;
        case (side_e'(s))
          SIDE_N: begin tx = c; ty = ARRAY_Y - 1; cb.b_sel[0] = DIRECT0; cb.a_sel[1] = DIRECT1; end
          SIDE_S: begin tx = c; ty = 0;           cb.a_sel[0] = DIRECT0; cb.b_sel[1] = DIRECT1; end
          SIDE_E: begin tx = ARRAY_X - 1; ty = c; cb.b_sel[0] = DIRECT0; cb.a_sel[1] = DIRECT1; end
          default: begin tx = 0; ty = c;          cb.a_sel[0] = DIRECT0; cb.b_sel[1] = DIRECT1; end
        endcase
        case (side_e'(s))
          SIDE_N:  cfg_write(ID_HCB + ARRAY_X * ARRAY_Y + c, 512'(cb), CB_CFG_BITS);
          SIDE_S:  cfg_write(ID_HCB + c, 512'(cb), CB_CFG_BITS);
          SIDE_E:  cfg_write(ID_VCB + ARRAY_Y * ARRAY_X + c, 512'(cb), CB_CFG_BITS);
          default: cfg_write(ID_VCB + c, 512'(cb), CB_CFG_BITS);
        endcase
        // bypass: pin 1 of side s <- pin 0 of side s
        tcfg[tx][ty].ir.out_sel[s * PINS + 1] = IR_SEL_W'(2 + LB_OUT + s * PINS + 0);
        tcfg[tx][ty].ir.out_oe[s * PINS + 1]  = 1'b1;
        cfg_write(ID_IO + IO_PER_SIDE * s + 2 * c, 512'(IO_IN), IO_CFG_BITS);
        cfg_write(ID_IO + IO_PER_SIDE * s + 2 * c + 1,
                  512'(is_reg(s, c) ? IO_OUT_REG : IO_OUT), IO_CFG_BITS);
      end
    end
    for (int x = 0; x < ARRAY_X; x++) for (int y = 0; y < ARRAY_Y; y++)
      cfg_write(ID_TILE + ARRAY_X * y + x, 512'(tcfg[x][y]), TILE_CFG_BITS);
  endtask

  int n_reg = 0, n_direct = 0;

  initial begin
    cfg_we = 1'b0; cfg_blk = '0; cfg_word = '0; cfg_wdata = '0;
    pad_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();
    prev_in = pad_in;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      prev_in = pad_in;
      pad_in  = {$urandom, $urandom};
      #1;
      for (int s = 0; s < 4; s++) begin
        for (int c = 0; c < ARRAY_X; c++) begin
          checks++;
          if (pad_oe[s][2*c] !== 1'b0 || pad_oe[s][2*c+1] !== 1'b1) begin
            failures++; $display("side %0d pair %0d: output enables wrong", s, c);
          end
          if (!is_reg(s, c)) begin
            checks++;
            if (pad_out[s][2*c+1] !== pad_in[s][2*c]) begin
              failures++; $display("side %0d pad %0d: direct path wrong", s, 2*c+1);
            end
            if (pad_in[s][2*c]) n_direct++;
          end else begin
            checks++;
            if (pad_out[s][2*c+1] !== prev_in[s][2*c]) begin
              failures++; $display("side %0d pad %0d: registered path wrong", s, 2*c+1);
            end
            if (prev_in[s][2*c]) n_reg++;
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_reg == 0 || n_direct == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
