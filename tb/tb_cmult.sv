// tb_cmult: random 17-bit operands times random Q1.15 twiddles; the result
// must equal floor((xr*wr - xi*wi) / 2^15) and floor((xr*wi + xi*wr) / 2^15),
// computed here with 64-bit integers.
`timescale 1ns/1ps
module tb_cmult;
  logic signed [16:0] x_re, x_im;
  logic signed [15:0] w_re, w_im;
  logic signed [17:0] y_re, y_im;
  int checks = 0, failures = 0;
  cmult #(.IW(17), .TW(16)) dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint pr, pi, er, ei;
      x_re = 17'($urandom); x_im = 17'($urandom);
      w_re = 16'($urandom); w_im = 16'($urandom);
      if (t == 0) begin x_re = -17'sd65536; x_im = -17'sd65536; w_re = 16'sd32767; w_im = -16'sd32767; end
      #1;
      pr = longint'(x_re) * longint'(w_re) - longint'(x_im) * longint'(w_im);
      pi = longint'(x_re) * longint'(w_im) + longint'(x_im) * longint'(w_re);
      er = pr >>> 15; ei = pi >>> 15;
      // only results that fit the 18-bit output are defined (|w| <= 1)
      if (er >= -131072 && er < 131072 && ei >= -131072 && ei < 131072) begin
        checks++;
        if (longint'(y_re) != er || longint'(y_im) != ei) begin
          failures++; $display("got %0d,%0d exp %0d,%0d", y_re, y_im, er, ei);
        end
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
