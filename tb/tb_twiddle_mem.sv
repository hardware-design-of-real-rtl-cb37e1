// tb_twiddle_mem: reads every word of the twiddle memory on every port and
// checks it against round(32767*cos(2 pi k/N)) and round(-32767*sin(...))
// for the four order regions (64 at 0, 32 at 64, 16 at 96, 8 at 112), with
// a one-cycle read latency and independent addresses on the ports.
`timescale 1ns/1ps
module tb_twiddle_mem;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [LMAX-1:0] rd_en;
  logic [TAW-1:0] rd_addr [LMAX];
  twid_t rd_data [LMAX];
  int checks = 0, failures = 0;
  twiddle_mem #(.NRD(LMAX)) dut (.*);

  function automatic int expect_word(int a, bit im);
    int base, n, k;
    real v;
    if (a < 64) begin base = 0; n = 64; end
    else if (a < 96) begin base = 64; n = 32; end
    else if (a < 112) begin base = 96; n = 16; end
    else begin base = 112; n = 8; end
    k = a - base;
    v = im ? -$sin(2.0 * PI * k / n) * 32767.0 : $cos(2.0 * PI * k / n) * 32767.0;
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  initial begin
    int a [LMAX];
    rd_en = '0;
    for (int p = 0; p < LMAX; p++) rd_addr[p] = '0;
    for (int t = 0; t < 120; t++) begin
      @(negedge clk);
      rd_en = '1;
      for (int p = 0; p < LMAX; p++) begin a[p] = (t + 17 * p) % 120; rd_addr[p] = TAW'(a[p]); end
      @(posedge clk); #1;
      for (int p = 0; p < LMAX; p++) begin
        checks++;
        if (int'(rd_data[p].re) != expect_word(a[p], 0) || int'(rd_data[p].im) != expect_word(a[p], 1)) begin
          failures++;
          if (failures < 10) $display("port %0d addr %0d got %0d,%0d", p, a[p], rd_data[p].re, rd_data[p].im);
        end
      end
    end
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
