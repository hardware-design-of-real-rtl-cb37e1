// tb_scaler: every 18-bit input in a sweep plus the extremes; expects
// round-half-up division by two, saturated to 16 bits.
`timescale 1ns/1ps
module tb_scaler;
  logic signed [17:0] x;
  logic signed [15:0] y;
  int checks = 0, failures = 0;
  scaler #(.IW(18), .OW(16)) dut (.*);
  initial begin
    for (int v = -131072; v < 131072; v += 7) begin
      int e;
      x = 18'(v);
      #1;
      e = (v + 1) >>> 1;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      checks++;
      if (int'(y) != e) begin failures++; if (failures < 10) $display("x=%0d got %0d exp %0d", v, y, e); end
    end
    x = 18'sd3; #1; checks++; if (y != 16'sd2) failures++;
    x = -18'sd3; #1; checks++; if (y != -16'sd1) failures++;
    x = 18'sd131071; #1; checks++; if (y != 16'sd32767) failures++;
    x = -18'sd131072; #1; checks++; if (y != -16'sd32768) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
