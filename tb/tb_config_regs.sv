// tb_config_regs: the point select is sampled only on frame_start; between
// frame starts changes of point_sel must not reach order/nlast, and
// order_change must pulse exactly once after a frame whose order differs.
`timescale 1ns/1ps
module tb_config_regs;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, frame_start = 0;
  order_t point_sel = '0, order;
  logic [AW-1:0] nlast;
  logic order_change;
  int checks = 0, failures = 0;
  config_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    int cur, prev, n_chg_exp, n_chg;
    n_chg = 0; n_chg_exp = 0; prev = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      cur = $urandom_range(0, 3);
      @(negedge clk); frame_start = 1; point_sel = order_t'(cur); #1;
      checks++; if (int'(order) != cur || int'(nlast) != (64 >> cur) - 1) failures++;
      if (prev >= 0 && prev != cur) n_chg_exp++;
      prev = cur;
      for (int i = 0; i < 5; i++) begin
        @(negedge clk); frame_start = 0; point_sel = order_t'($urandom_range(0, 3));
        if (order_change) n_chg++;
        #1;
        checks++; if (int'(order) != cur || int'(nlast) != (64 >> cur) - 1) failures++;
      end
    end
    @(negedge clk); if (order_change) n_chg++;
    checks++; if (n_chg != n_chg_exp) begin failures++; $display("changes %0d exp %0d", n_chg, n_chg_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
