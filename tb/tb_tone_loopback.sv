// tb_tone_loopback: the tone tests of the design, run as a continuous loop.
//
// One period of a test tone is played over and over, as from a looped
// sample ROM, with in_valid held high: DC, fs/2 and fs/4 at full scale on
// I (Q = 0), first at 16 points, then at 64 points. For each output frame
// the expected spectrum of the real tone of amplitude A, divided by N, is:
//   DC:   A in bin 0;       fs/2: A in bin N/2;
//   fs/4: A/2 in bins N/4 and 3N/4;  every other bin 0  (tolerance TOL).
// In bit-reversed order the fs/4 peak appears at serial position 2 for both
// sizes (bin 4 of 16, bin 16 of 64). The test also checks that frames at a
// fixed order leave exactly N cycles apart (so each of the two output banks
// delivers every 2N cycles: 6.4 us at 16 points and 25.6 us at 64 points
// with the 5 MHz clock used here) and that repeated frames of the same tone
// give identical outputs.
`timescale 1ns/1ps
module tb_tone_loopback;
  import fft_pkg::*;

  localparam int TOL  = 3;
  localparam int REPS = 4;   // frames per tone and size
  localparam int A    = 32767;

  logic clk = 1'b0, rst_n = 1'b0;
  always #100 clk = ~clk;   // 5 MHz

  logic in_valid, in_ready, out_valid, out_first, out_last, order_change;
  cplx_t in_data, out_data;
  order_t point_sel, out_order;
  logic [AW-1:0] out_bin;

  var_fft_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int tone(int kind, int n);
    case (kind)
      0: return A;
      1: return (n % 2 == 0) ? A : -A;
      default: return (n % 4 == 0) ? A : ((n % 4 == 2) ? -A : 0);
    endcase
  endfunction

  // schedule: sizes 16 then 64, tones DC, fs/2, fs/4, REPS frames each
  localparam int NF = 2 * 3 * REPS;
  int f_ord [NF];
  int f_kind [NF];
  initial begin
    for (int f = 0; f < NF; f++) begin
      f_ord[f]  = (f < NF / 2) ? 2 : 0;
      f_kind[f] = (f / REPS) % 3;
    end
  end

  initial begin
    in_valid = 1'b0; in_data = '0; point_sel = 2'd2;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < (64 >> f_ord[f]); n++) begin
        in_valid <= 1'b1;
        point_sel <= order_t'(f_ord[f]);
        in_data.re <= DW'(tone(f_kind[f], n));
        in_data.im <= '0;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  int nout = 0, pos = 0;
  longint last_first = -1;
  int prev_re [64], prev_im [64];
  int cur_re [64], cur_im [64];
  int n_spacing = 0, n_repeat = 0;

  function automatic int expect_re(int kind, int nn, int k);
    case (kind)
      0: return (k == 0) ? A : 0;
      1: return (k == nn / 2) ? A : 0;
      default: return (k == nn / 4 || k == 3 * nn / 4) ? A / 2 : 0;
    endcase
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, nn, k;
      if (out_first) begin
        if (last_first >= 0 && nout > 0 && f_ord[nout] == f_ord[nout - 1]) begin
          check(cyc - 1 - last_first == 64'(64 >> f_ord[nout]),
                $sformatf("frame %0d spacing %0d", nout, cyc - 1 - last_first));
          n_spacing++;
        end
        last_first = cyc - 1;
        pos = 0;
      end
      f = nout;
      nn = 64 >> f_ord[f];
      k = int'(out_bin);
      check(int'(out_order) == f_ord[f], "order");
      check(iabs(int'(out_data.re) - expect_re(f_kind[f], nn, k)) <= TOL && iabs(int'(out_data.im)) <= TOL,
            $sformatf("frame %0d N=%0d tone %0d bin %0d: (%0d,%0d)", f, nn, f_kind[f], k, out_data.re, out_data.im));
      if (f_kind[f] == 2 && pos == 2)
        check(k == nn / 4 && out_data.re > 16000, "fs/4 peak not at serial position 2");
      cur_re[pos] = int'(out_data.re);
      cur_im[pos] = int'(out_data.im);
      if (out_last) begin
        if (f > 0 && f_kind[f] == f_kind[f - 1] && f_ord[f] == f_ord[f - 1]) begin
          automatic bit same = 1'b1;
          for (int i = 0; i < nn; i++) if (cur_re[i] != prev_re[i] || cur_im[i] != prev_im[i]) same = 1'b0;
          check(same, $sformatf("frame %0d differs from the previous one", f));
          n_repeat++;
        end
        prev_re = cur_re;
        prev_im = cur_im;
        nout++;
      end
      pos++;
    end
  end

  initial begin
    wait (rst_n);
    wait (nout == NF);
    repeat (4) @(posedge clk);
    check(n_spacing >= 2 * 3 * (REPS - 1), "too few spacing checks");
    check(n_repeat > 0, "no repeated frame compared");
    $display("frames %0d, spacing checks %0d, repeat checks %0d", nout, n_spacing, n_repeat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: %0d frames out", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
