// tb_signed_addsub: random operands including the extremes; checks a+b and
// b-a against integer arithmetic.
`timescale 1ns/1ps
module tb_signed_addsub;
  import fft_pkg::*;
  logic sub;
  cplx_t a, b;
  logic signed [DW:0] y_re, y_im;
  int checks = 0, failures = 0;
  signed_addsub dut (.*);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int er, ei;
      sub = 1'($urandom);
      a = (t < 4) ? {16'sh8000, 16'sh7fff} : cplx_t'($urandom);
      b = (t < 2) ? {16'sh8000, 16'sh8000} : cplx_t'($urandom);
      #1;
      er = sub ? int'(b.re) - int'(a.re) : int'(a.re) + int'(b.re);
      ei = sub ? int'(b.im) - int'(a.im) : int'(a.im) + int'(b.im);
      checks++;
      if (int'(y_re) != er || int'(y_im) != ei) begin
        failures++; $display("sub=%0d got %0d,%0d exp %0d,%0d", sub, y_re, y_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
