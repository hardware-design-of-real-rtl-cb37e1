// tb_var_fft_top: end-to-end test of the configurable streaming FFT.
//
// A continuous stream of frames is fed with in_valid held high; the order
// of each frame comes from a schedule that visits all four orders, switches
// between them (up and down, so that the input must be held off at least
// once), and includes the tone tests of the design: a DC frame, a tone at
// fs/2 and a tone at fs/4 for 16 and 64 points. Every output frame is
// compared, bin by bin, with a floating-point DFT of the input divided by N
// (tolerance TOL LSB). The test also checks the bit-reversed bin order, the
// first-frame latency N + log2(N)*(N+1) + 1, the output frame spacing of N
// cycles at a fixed order for 16 and 64 points (2N per output bank: 6.4 us
// and 25.6 us at a 5 MHz clock), the position of the fs/4 peak, and that every mechanism
// occurred: each order, an order change, an input hold-off, a gap in the
// input stream (the last ten frames have random idle cycles) and a frame
// leaving through a stage other than the last.
`timescale 1ns/1ps
module tb_var_fft_top;
  import fft_pkg::*;

  localparam int TOL    = 4;
  localparam int NFRAME = 120;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready;
  cplx_t in_data;
  order_t point_sel;
  logic out_valid, out_first, out_last, order_change;
  cplx_t out_data;
  logic [AW-1:0] out_bin;
  order_t out_order;

  always #100 clk = ~clk;   // 200 ns period, the 5 MHz clock of the design

  var_fft_top dut (.*);

  int checks = 0;
  int failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ----------------------------------------------------------- schedule
  typedef struct {
    int ord;     // order code
    int kind;    // 0 random, 1 DC, 2 fs/2, 3 fs/4
  } fdesc_t;
  fdesc_t sched [NFRAME];

  typedef struct {
    int ord;
    int kind;
    int re [64];
    int im [64];
    longint t_first;
  } frame_t;
  frame_t sent [$];

  int n_ord_seen [4];
  int n_change = 0;
  int n_stall = 0;
  int n_short_exit = 0;
  int n_tone_ok = 0;
  int n_gap = 0;

  initial begin
    int i;
    i = 0;
    // fixed 16-point run with the DC, fs/2 and fs/4 test tones
    sched[i++] = '{2, 1}; sched[i++] = '{2, 2}; sched[i++] = '{2, 3};
    sched[i++] = '{2, 0}; sched[i++] = '{2, 0};
    // 64-point
    sched[i++] = '{0, 3}; sched[i++] = '{0, 0}; sched[i++] = '{0, 1};
    // down to 8 points (input hold-off), then 32, 8, 64 ...
    sched[i++] = '{3, 0}; sched[i++] = '{3, 0}; sched[i++] = '{3, 2};
    sched[i++] = '{1, 0}; sched[i++] = '{1, 3}; sched[i++] = '{3, 0};
    sched[i++] = '{0, 0}; sched[i++] = '{2, 0}; sched[i++] = '{1, 0};
    while (i < NFRAME) begin
      sched[i] = '{int'($urandom_range(0, 3)), 0};
      i++;
    end
  end

  function automatic int sample_val(int kind, int n, int nn, bit q, int rnd);
    case (kind)
      1: return q ? 0 : 20000;
      2: return q ? 0 : ((n % 2 != 0) ? -32767 : 32767);
      3: return q ? 0 : $rtoi($cos(2.0 * PI * n / 4.0) * 32767.0);
      default: return rnd;
    endcase
  endfunction

  // ------------------------------------------------------------- driver
  initial begin
    in_valid  = 1'b0;
    in_data   = '0;
    point_sel = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    for (int f = 0; f < NFRAME; f++) begin
      frame_t fr;
      int nn;
      fr.ord = sched[f].ord;
      fr.kind = sched[f].kind;
      nn = 64 >> fr.ord;
      for (int n = 0; n < nn; n++) begin
        fr.re[n] = sample_val(fr.kind, n, nn, 0, int'($urandom_range(0, 32000)) - 16000);
        fr.im[n] = sample_val(fr.kind, n, nn, 1, int'($urandom_range(0, 32000)) - 16000);
      end
      for (int n = 0; n < nn; n++) begin
        // the last frames have random gaps in the stream
        if (f >= NFRAME - 10 && $urandom_range(0, 7) == 0) begin
          in_valid <= 1'b0;
          n_gap++;
          @(posedge clk);
        end
        in_valid  <= 1'b1;
        point_sel <= order_t'(fr.ord);
        in_data.re <= DW'(fr.re[n]);
        in_data.im <= DW'(fr.im[n]);
        @(posedge clk);
        while (!in_ready) begin
          n_stall++;
          @(posedge clk);
        end
        if (n == 0) fr.t_first = cyc - 1;
      end
      sent.push_back(fr);
      n_ord_seen[fr.ord]++;
    end
    in_valid <= 1'b0;
  end

  always @(posedge clk) if (order_change) n_change++;

  // ------------------------------------------------------------ monitor
  frame_t cur;
  int pos = 0;
  int nout = 0;
  longint last_first = -1;
  int last_ord = -1;
  real ref_re [64];
  real ref_im [64];
  int peak_pos;
  int peak_val;

  task automatic make_ref(frame_t fr);
    int nn;
    nn = 64 >> fr.ord;
    for (int k = 0; k < nn; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < nn; n++) begin
        real a;
        a = -2.0 * PI * real'((k * n) % nn) / real'(nn);
        sr += real'(fr.re[n]) * $cos(a) - real'(fr.im[n]) * $sin(a);
        si += real'(fr.re[n]) * $sin(a) + real'(fr.im[n]) * $cos(a);
      end
      ref_re[k] = sr / nn;
      ref_im[k] = si / nn;
    end
  endtask

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((v & (1 << i)) != 0) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int nn, ll, k;
      if (out_first) begin
        check(sent.size() > 0, "output frame with nothing sent");
        if (sent.size() > 0) begin
          cur = sent.pop_front();
          make_ref(cur);
          nn = 64 >> cur.ord;
          ll = 6 - cur.ord;
          if (nout == 0)
            check(cyc - 1 - cur.t_first == (longint'(nn) + longint'(ll) * (longint'(nn) + 64'd1) + 64'd1),
                  $sformatf("first latency %0d, expected %0d", cyc - 1 - cur.t_first, (longint'(nn) + longint'(ll) * (longint'(nn) + 64'd1) + 64'd1)));
          if (last_first >= 0 && last_ord == cur.ord && ((cur.ord == 2 && nout < 5) || (cur.ord == 0 && nout >= 6 && nout < 8)))
            check(cyc - 1 - last_first == 64'(nn), $sformatf("frame spacing %0d", cyc - 1 - last_first));
          // a frame that left through a stage other than the last
          if (cur.ord != 0) n_short_exit++;
          last_first = cyc - 1;
          last_ord = cur.ord;
          nout++;
          peak_pos = -1; peak_val = -1;
        end
        pos = 0;
      end
      nn = 64 >> cur.ord;
      ll = 6 - cur.ord;
      k = bitrev(pos, ll);
      check(int'(out_order) == cur.ord, "out_order mismatch");
      check(int'(out_bin) == k, $sformatf("out_bin %0d expected %0d", out_bin, k));
      check(rabs(real'(out_data.re) - ref_re[k]) <= TOL && rabs(real'(out_data.im) - ref_im[k]) <= TOL,
            $sformatf("frame %0d ord %0d bin %0d: got (%0d,%0d) ref (%0.1f,%0.1f)", nout - 1, cur.ord, k,
                      out_data.re, out_data.im, ref_re[k], ref_im[k]));
      if (int'(out_data.re) > peak_val) begin peak_val = int'(out_data.re); peak_pos = pos; end
      check(out_last == (pos == nn - 1), "out_last misplaced");
      if (out_last && cur.kind == 3) begin
        // fs/4 tone: bin N/4, which is serial position 2 (bit-reversed)
        check(peak_pos == 2 && peak_val > 16000, $sformatf("fs/4 peak at %0d val %0d", peak_pos, peak_val));
        n_tone_ok++;
      end
      pos++;
    end
  end

  // ------------------------------------------------------ end and watchdog
  initial begin
    wait (rst_n);
    wait (nout == NFRAME && !out_valid);
    repeat (5) @(posedge clk);
    for (int o = 0; o < 4; o++) check(n_ord_seen[o] > 0, $sformatf("order %0d never used", o));
    check(n_change > 0, "no order change");
    check(n_stall > 0, "input never held off");
    check(n_short_exit > 0, "no frame left before the last stage");
    check(n_tone_ok >= 3, "fs/4 tone frames not all seen");
    check(n_gap > 0, "no gap in the input stream");
    $display("mechanisms: order changes=%0d input hold-off cycles=%0d early exits=%0d tone frames=%0d input gaps=%0d",
             n_change, n_stall, n_short_exit, n_tone_ok, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d frames out", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
