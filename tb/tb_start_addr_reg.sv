// tb_start_addr_reg: loads each order code and checks the start address
// (0, 64, 96, 112), both the pass-through in the load cycle and the held
// value afterwards while the order input changes.
`timescale 1ns/1ps
module tb_start_addr_reg;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  order_t order = '0;
  logic [TAW-1:0] start_addr;
  int checks = 0, failures = 0;
  int exp_base [4] = '{0, 64, 96, 112};
  start_addr_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int o;
      o = $urandom_range(0, 3);
      @(negedge clk); load = 1; order = order_t'(o); #1;
      checks++; if (int'(start_addr) != exp_base[o]) failures++;
      @(negedge clk); load = 0; order = order_t'($urandom_range(0, 3)); #1;
      checks++; if (int'(start_addr) != exp_base[o]) failures++;
      @(negedge clk); #1;
      checks++; if (int'(start_addr) != exp_base[o]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
