// tb_sync_ctrl: the synchronization logic driving behavioural stand-ins of
// the six butterfly stages (each reads N cycles from start, rd_last on the
// last read, writes one cycle behind, wr_last on the last write). Instead of
// samples the testbench tracks frame numbers: the input writes a frame's
// number into its column-0 bank, a stage model copies the number of its
// source bank into its destination bank, the output read gives the number
// of the frame it reads. Checks: no bank is written while its frame is
// still unread, every frame visits exactly stages 0..log2(N)-1 and goes to
// the output buffer after the last of them, frames leave in the order they
// came, the output words of a frame are consecutive with bit-reversed
// out_bin, the input is never held off at a fixed order, and the first
// latency is N + log2(N)*(N+1) + 1 cycles. Orders are switched at random,
// so the hold-off and the no-overtaking rule are exercised.
`timescale 1ns/1ps
module tb_sync_ctrl;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, frame_start, in_wr_en, in_wr_bank;
  order_t in_order;
  logic [AW-1:0] in_nlast, in_wr_addr;
  logic [LMAX-1:0] stg_start, stg_src_bank, stg_dst_bank, stg_dst_out, stg_busy;
  logic [LMAX-1:0] stg_rd_last, stg_rd_last_bank, stg_wr_last, stg_wr_bank, stg_wr_out;
  order_t stg_order [LMAX];
  logic out_rd_en, out_rd_bank, out_valid, out_first, out_last;
  logic [AW-1:0] out_rd_addr, out_bin;
  order_t out_order;
  order_t point_sel;

  sync_ctrl dut (.*);

  assign in_order = frame_start ? point_sel : cur_ord;
  assign in_nlast = AW'((64 >> in_order) - 1);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // frame bookkeeping: content[col][bank] = frame number, -1 when consumed
  int content  [LMAX+1][2];
  int visited  [int];          // frame -> stages seen as a bit mask
  int f_ord    [int];
  longint f_t0 [int];
  order_t cur_ord;
  int in_frame = -1;

  // stage models
  int  s_k    [LMAX];
  bit  s_run  [LMAX];
  int  s_n    [LMAX];
  bit  s_src  [LMAX];
  int  s_fr   [LMAX];
  bit  w_v    [LMAX];
  bit  w_last [LMAX];
  bit  w_bank [LMAX];
  bit  w_out  [LMAX];
  bit  w_dst  [LMAX], w_dsto [LMAX];
  int  w_fr   [LMAX];

  always_comb begin
    for (int c = 0; c < LMAX; c++) begin
      stg_busy[c]         = s_run[c];
      stg_rd_last[c]      = s_run[c] && (s_k[c] == s_n[c] - 1);
      stg_rd_last_bank[c] = s_src[c];
      stg_wr_last[c]      = w_v[c] && w_last[c];
      stg_wr_bank[c]      = w_bank[c];
      stg_wr_out[c]       = w_out[c];
    end
  end

  int rd_fr_q;
  int order_chk_next = 0;
  int out_pos = 0;
  int out_fr = -1;
  int stalls = 0, waits_overtake = 0;

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((v & (1 << i)) != 0) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // input writer
      if (in_wr_en) begin
        if (frame_start) begin
          in_frame++;
          check(content[0][in_wr_bank] == -1, "input overwrites an unread frame");
          content[0][in_wr_bank] = in_frame;
          f_ord[in_frame] = int'(in_order);
          f_t0[in_frame] = cyc;
          visited[in_frame] = 0;
          cur_ord <= in_order;
        end
      end
      // stage write side (one cycle behind the reads)
      for (int c = 0; c < LMAX; c++) begin
        if (w_v[c] && w_last[c]) begin
          int col;
          col = w_out[c] ? LMAX : c + 1;
          content[col][w_bank[c]] = w_fr[c];
        end
      end
      // stage read side: reads of running stages, last reads free banks
      for (int c = 0; c < LMAX; c++) begin
        w_v[c] = 1'b0;
        if (s_run[c]) begin
          w_v[c] = 1'b1; w_last[c] = (s_k[c] == s_n[c] - 1); w_bank[c] = w_dst[c]; w_out[c] = w_dsto[c]; w_fr[c] = s_fr[c];
          if (s_k[c] == s_n[c] - 1) begin
            s_run[c] = 1'b0;
            content[c][s_src[c]] = -1;
          end
          s_k[c]++;
        end
      end
      // output reader
      if (out_rd_en) begin
        rd_fr_q <= content[LMAX][out_rd_bank];
        if (int'(out_rd_addr) == (64 >> f_ord[content[LMAX][out_rd_bank]]) - 1)
          content[LMAX][out_rd_bank] = -1;
      end
      // stage starts: the start cycle is the read of sample 0
      for (int c = 0; c < LMAX; c++) begin
        if (stg_start[c]) begin
          int fr, l, col;
          fr = content[c][stg_src_bank[c]];
          check(fr >= 0, $sformatf("stage %0d starts on an empty bank", c));
          check(int'(stg_order[c]) == f_ord[fr], "stage order differs from frame order");
          l = 6 - f_ord[fr];
          check(visited[fr] == (1 << c) - 1, "stage visited out of sequence");
          visited[fr] |= 1 << c;
          check(stg_dst_out[c] == (c == l - 1), "output buffer chosen at the wrong stage");
          col = stg_dst_out[c] ? LMAX : c + 1;
          check(content[col][stg_dst_bank[c]] == -1, "destination bank still holds an unread frame");
          s_run[c] = 1'b1; s_k[c] = 1; s_n[c] = 64 >> f_ord[fr]; s_src[c] = stg_src_bank[c];
          s_fr[c] = fr; w_dst[c] = stg_dst_bank[c]; w_dsto[c] = stg_dst_out[c];
          w_v[c] = 1'b1; w_last[c] = 1'b0; w_bank[c] = w_dst[c]; w_out[c] = w_dsto[c]; w_fr[c] = fr;
        end
      end
    end
  end

  // output side
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        int nn;
        longint exp_lat;
        if (out_first) begin
          out_fr = rd_fr_q;
          check(out_fr == order_chk_next, $sformatf("frame %0d out, expected %0d", out_fr, order_chk_next));
          check(visited[out_fr] == (1 << (6 - f_ord[out_fr])) - 1, "frame skipped a stage");
          begin
            longint n0, l0;
            n0 = 64'd64 >> f_ord[0];
            l0 = 64'd6 - 64'(f_ord[0]);
            exp_lat = n0 + l0 * (n0 + 64'd1) + 64'd1;
          end
          if (out_fr == 0)
            check(cyc - f_t0[0] == exp_lat,
                  $sformatf("latency %0d", cyc - f_t0[0]));
          order_chk_next++;
          out_pos = 0;
        end
        nn = 64 >> f_ord[out_fr];
        check(int'(out_order) == f_ord[out_fr], "out_order");
        check(int'(out_bin) == bitrev(out_pos, 6 - f_ord[out_fr]), "out_bin");
        check(out_last == (out_pos == nn - 1), "out_last");
        out_pos++;
      end
    end
  end

  localparam int NF = 60;
  initial begin
    for (int c = 0; c <= LMAX; c++) begin content[c][0] = -1; content[c][1] = -1; end
    for (int c = 0; c < LMAX; c++) begin s_run[c] = 0; s_k[c] = 0; s_n[c] = 1; w_v[c] = 0; w_last[c] = 0; end
    in_valid = 0; point_sel = '0; cur_ord = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int o;
      o = (f < 6) ? 2 : ((f % 5 == 0) ? $urandom_range(0, 3) : f_ord[f - 1]);
      for (int n = 0; n < (64 >> o); n++) begin
        @(negedge clk);
        in_valid = 1; point_sel = order_t'(o);
        while (!in_ready) begin
          if (f > 0 && f < 6) check(0, "input held off at a fixed order");
          stalls++;
          @(negedge clk);
        end
      end
    end
    @(negedge clk); in_valid = 0;
    while (order_chk_next < NF) @(negedge clk);
    repeat (5) @(negedge clk);
    check(stalls > 0, "input hold-off never exercised");
    $display("input hold-off cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog: %0d frames out", order_chk_next);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
