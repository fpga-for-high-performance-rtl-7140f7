// tb_io_block: self-checking test of the IO block.
//
// Runs random bit streams through the block in all four configurations
// (input or output, direct or registered) and checks the values, the
// direction signals and the one-clock latency of the registered mode.
module tb_io_block;
  import bsfpga_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  io_cfg_t cfg;
  logic pad_in, pad_out, pad_oe, pin_in, pin_out, pin_oe;
  logic prev;

  int checks = 0, failures = 0;

  io_block dut (.clk, .rst_n, .cfg, .pad_in, .pad_out, .pad_oe, .pin_in, .pin_out, .pin_oe);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg = '0; pad_in = 1'b0; pin_in = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 4; mode++) begin
      cfg = io_cfg_t'(mode);
      pad_in = 1'b0; pin_in = 1'b0;
      prev = 1'b0;
      @(negedge clk);
      for (int k = 0; k < 200; k++) begin
        pad_in = 1'($urandom); pin_in = 1'($urandom);
        #1;
        checks++;
        if (cfg.out_en) begin
          if (pad_oe !== 1'b1 || pin_oe !== 1'b0 ||
              pad_out !== (cfg.reg_en ? prev : pin_in)) begin
            failures++; $display("output mode %0d step %0d wrong", mode, k);
          end
          prev = pin_in;
        end else begin
          if (pad_oe !== 1'b0 || pin_oe !== 1'b1 ||
              pin_out !== (cfg.reg_en ? prev : pad_in)) begin
            failures++; $display("input mode %0d step %0d wrong", mode, k);
          end
          prev = pad_in;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
