// tb_fft_stage: one butterfly stage (stage index 1) against models of its
// source RAM and of the twiddle memory. Back-to-back frames of all four
// orders are read; for every write the testbench recomputes the expected
// result from the frame contents: upper half (x[k]+x[k+h]+1)>>1, lower half
// ((x[k-h]-x[k]) * W_N^((k mod h)*2)) >> 15, then (.+1)>>1, saturated,
// with W rounded from cos/sin here. It also checks the partner address,
// the write address and bank, the one-cycle read-to-write delay and the
// rd_last / wr_last pulses, with each new frame started in the cycle right
// after the previous rd_last, while its last write is still under way.
`timescale 1ns/1ps
module tb_fft_stage;
  import fft_pkg::*;
  localparam int S = 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, src_bank, dst_bank, dst_out, busy;
  order_t order;
  logic rd_en, rd_bank, rd_last, rd_last_bank, tw_en, wr_en, wr_bank, wr_out, wr_last;
  logic [AW-1:0] rd_addr_a, rd_addr_b, wr_addr;
  logic [TAW-1:0] tw_addr;
  cplx_t rd_data_a, rd_data_b, wr_data;
  twid_t tw_data;

  fft_stage #(.STAGE(S)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t mem [2][64];
  int tw_re [TW_DEPTH], tw_im [TW_DEPTH];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  // source RAM and twiddle memory models (registered reads)
  always @(posedge clk) begin
    if (rd_en) begin
      rd_data_a <= mem[rd_bank][rd_addr_a];
      rd_data_b <= mem[rd_bank][rd_addr_b];
    end
    if (tw_en) begin
      tw_data.re <= 16'(tw_re[tw_addr]);
      tw_data.im <= 16'(tw_im[tw_addr]);
    end
  end

  function automatic int rnd(real v);
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic int sat_half(longint v);
    longint h;
    h = (v + 1) >>> 1;
    if (h > 32767) h = 32767;
    if (h < -32768) h = -32768;
    return int'(h);
  endfunction

  // expected frame per start, in order
  typedef struct { int ord; bit src; bit dst; bit out; } job_t;
  job_t jobs [$];
  job_t cur;
  int wpos = 0;

  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      int nn, h, k, w, p, ar, ai, br, bi, er, ei;
      longint dr, di, mr, mi;
      if (wpos == 0) cur = jobs.pop_front();
      nn = 64 >> cur.ord;
      h = nn >> (S + 1);
      k = wpos;
      check(int'(wr_addr) == k, $sformatf("wr_addr %0d exp %0d", wr_addr, k));
      check(wr_bank == cur.dst && wr_out == cur.out, "write bank / out flag");
      if ((k & h) == 0) begin
        p = k + h;
        er = sat_half(longint'(mem[cur.src][k].re) + longint'(mem[cur.src][p].re));
        ei = sat_half(longint'(mem[cur.src][k].im) + longint'(mem[cur.src][p].im));
      end else begin
        p = k - h;
        w = (k % h) * (1 << S);
        dr = longint'(mem[cur.src][p].re) - longint'(mem[cur.src][k].re);
        di = longint'(mem[cur.src][p].im) - longint'(mem[cur.src][k].im);
        begin
          int wr_, wi_;
          wr_ = rnd($cos(2.0 * PI * w / nn) * 32767.0);
          wi_ = rnd(-$sin(2.0 * PI * w / nn) * 32767.0);
          mr = (dr * wr_ - di * wi_) >>> 15;
          mi = (dr * wi_ + di * wr_) >>> 15;
        end
        er = sat_half(mr);
        ei = sat_half(mi);
      end
      check(int'(wr_data.re) == er && int'(wr_data.im) == ei,
            $sformatf("ord %0d k %0d got %0d,%0d exp %0d,%0d", cur.ord, k, wr_data.re, wr_data.im, er, ei));
      check(wr_last == (k == nn - 1), "wr_last");
      wpos = (k == nn - 1) ? 0 : k + 1;
    end
  end

  // read side checks
  int rpos = 0;
  int rd_ord;
  always @(posedge clk) begin
    if (rst_n && rd_en) begin
      int nn, h;
      if (start) begin rpos = 0; rd_ord = int'(order); end
      nn = 64 >> rd_ord;
      h = nn >> (S + 1);
      check(int'(rd_addr_a) == rpos && int'(rd_addr_b) == (rpos ^ h), "read addresses");
      check(rd_last == (rpos == nn - 1), "rd_last");
      rpos++;
    end
  end

  initial begin
    automatic int base [4] = '{0, 64, 96, 112};
    for (int o = 0; o < 4; o++)
      for (int k = 0; k < (64 >> o); k++) begin
        tw_re[base[o] + k] = rnd($cos(2.0 * PI * k / (64 >> o)) * 32767.0);
        tw_im[base[o] + k] = rnd(-$sin(2.0 * PI * k / (64 >> o)) * 32767.0);
      end
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 64; i++) begin
        mem[b][i].re = 16'($urandom);
        mem[b][i].im = (i % 7 == 0) ? 16'sh8000 : 16'($urandom);
      end
    start = 0; order = '0; src_bank = 0; dst_bank = 0; dst_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 16; f++) begin
      job_t j;
      j.ord = f % 4; j.src = 1'(f / 2); j.dst = 1'($urandom); j.out = 1'($urandom);
      // wait until idle; start on the first free cycle (back to back)
      while (busy && !rd_last) @(negedge clk);
      if (busy) @(negedge clk);
      start = 1; order = order_t'(j.ord); src_bank = j.src; dst_bank = j.dst; dst_out = j.out;
      jobs.push_back(j);
      @(negedge clk);
      start = 0; order = order_t'($urandom); src_bank = 1'($urandom); dst_bank = 1'($urandom); dst_out = 1'($urandom);
      check(busy, "busy after start");
    end
    while (busy || wpos != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(jobs.size() == 0, "frames left unwritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
