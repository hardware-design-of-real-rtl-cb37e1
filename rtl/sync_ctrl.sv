// sync_ctrl: synchronization and data-flow logic of the FFT pipeline.
//
// The pipeline is a chain of frame buffers: column 0 takes the input,
// column c feeds butterfly stage c, and a last column (index LMAX) is the
// output buffer. Every column has two banks. This block keeps, for every
// bank, its state (FREE, FILL, FULL, READ) and the order of the frame in
// it, plus a write and a read pointer per column, and from them makes all
// write and read enables:
//  * Input: samples are written into column 0 at the write pointer's bank,
//    address 0..N-1. The first sample of a frame starts it (frame_start,
//    the order is sampled then); the last marks it FULL and flips the bank.
//    in_ready is low only while both input banks are taken.
//  * Stage c starts when its read bank is FULL, it is not reading, and the
//    destination bank is FREE (or is being read for the last time in this
//    cycle: its first new write comes a cycle later). The destination is
//    column c+1, or the output buffer when c is the last stage of the
//    frame's order (c = log2 N - 1).
//    At start the source becomes READ and the destination FILL, and both
//    pointers flip; rd_last frees the source, wr_last fills the
//    destination. A stage sending a frame to the output buffer before the
//    last stage waits until columns c+1..LMAX-1 are empty, so a short frame
//    never overtakes a longer one that is still in the pipeline.
//  * Output: when the output read bank is FULL, it is read out serially,
//    N samples on consecutive cycles; out_valid follows the read by one
//    cycle (synchronous RAM). The two output banks alternate, so in steady
//    state each bank delivers a frame every 2N cycles and the combined
//    output a frame every N cycles.
// Steady state at a fixed order: one sample in and one out per cycle; each
// stage starts N+1 cycles after the previous one.
// The published design names this block and gives the write/read enable
// overlap between neighbouring columns; the bank-state scheme, the input
// hold-off at a change to a smaller order and the in-order rule are this
// design's own.
module sync_ctrl
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  output logic          frame_start,
  input  order_t        in_order,     // order of the frame being written
  input  logic [AW-1:0] in_nlast,
  output logic          in_wr_en,
  output logic          in_wr_bank,
  output logic [AW-1:0] in_wr_addr,
  // butterfly stages
  output logic [LMAX-1:0] stg_start,
  output order_t          stg_order    [LMAX],
  output logic [LMAX-1:0] stg_src_bank,
  output logic [LMAX-1:0] stg_dst_bank,
  output logic [LMAX-1:0] stg_dst_out,
  input  logic [LMAX-1:0] stg_busy,
  input  logic [LMAX-1:0] stg_rd_last,
  input  logic [LMAX-1:0] stg_rd_last_bank,
  input  logic [LMAX-1:0] stg_wr_last,
  input  logic [LMAX-1:0] stg_wr_bank,
  input  logic [LMAX-1:0] stg_wr_out,
  // output buffer read-out
  output logic          out_rd_en,
  output logic          out_rd_bank,
  output logic [AW-1:0] out_rd_addr,
  output logic          out_valid,
  output logic          out_first,
  output logic          out_last,
  output logic [AW-1:0] out_bin,
  output order_t        out_order
);

  typedef enum logic [1:0] {FREE, FILL, FULL, READ} bstate_t;

  localparam int unsigned NCOL = LMAX + 1;

  bstate_t st   [NCOL][2];
  order_t  tag  [NCOL][2];
  logic    wp   [NCOL];
  logic    rp   [NCOL];
  logic [AW-1:0] in_cnt;

  // output reader
  logic          o_run;
  logic [AW-1:0] o_cnt;
  order_t        o_ord;
  logic          o_bank;
  logic          o_rel;       // output reader's last read ...
  logic          o_rel_bank;  // ... and its bank

  // ---------------------------------------------------------------- input
  assign in_ready    = (st[0][wp[0]] == FREE) || (st[0][wp[0]] == FILL);
  assign in_wr_en    = in_valid && in_ready;
  assign frame_start = in_wr_en && (st[0][wp[0]] == FREE);
  assign in_wr_bank  = wp[0];
  assign in_wr_addr  = frame_start ? '0 : in_cnt;

  // --------------------------------------------------------------- stages
  logic [LMAX-1:0] col_empty;   // column c holds no frame at all
  logic [LMAX-1:0] dst_is_out;
  logic [LMAX-1:0] go;

  always_comb begin
    for (int c = 0; c < LMAX; c++)
      col_empty[c] = (st[c][0] == FREE) && (st[c][1] == FREE);
  end

  // claimable: FREE, or READ with its last read in this cycle (the new
  // frame's first write comes one cycle after the claim)
  logic [1:0] claimable [NCOL];
  always_comb begin
    for (int c = 0; c < NCOL; c++)
      for (int b = 0; b < 2; b++) begin
        claimable[c][b] = (st[c][b] == FREE);
        if (c < LMAX) begin
          if (st[c][b] == READ && stg_rd_last[c % LMAX] && (stg_rd_last_bank[c % LMAX] == 1'(b)))
            claimable[c][b] = 1'b1;
        end else begin
          if (st[c][b] == READ && o_rel && (o_rel_bank == 1'(b)))
            claimable[c][b] = 1'b1;
        end
      end
  end

  always_comb begin
    for (int c = 0; c < LMAX; c++) begin
      order_t o;
      logic   dfree;
      logic   later_empty;
      o = tag[c][rp[c]];
      dst_is_out[c] = (int'(order_log2(o)) == c + 1);
      later_empty = 1'b1;
      for (int j = c + 1; j < LMAX; j++)
        later_empty &= col_empty[j];
      if (dst_is_out[c])
        dfree = claimable[LMAX][wp[LMAX]] && later_empty;
      else
        dfree = (c + 1 < LMAX) ? claimable[(c+1) % NCOL][wp[(c+1) % NCOL]] : 1'b0;
      go[c] = (st[c][rp[c]] == FULL) && !stg_busy[c] && dfree;
      stg_order[c]    = o;
      stg_src_bank[c] = rp[c];
      stg_dst_out[c]  = dst_is_out[c];
      stg_dst_bank[c] = dst_is_out[c] ? wp[LMAX] : wp[(c+1) % NCOL];
    end
  end

  assign stg_start = go;

  // ----------------------------------------------------------- out reader
  logic          o_go;
  logic          o_act;
  logic [AW-1:0] o_addr;
  order_t        o_ord_c;

  assign o_go    = !o_run && (st[LMAX][rp[LMAX]] == FULL);
  assign o_act   = o_go || o_run;
  assign o_addr  = o_go ? '0 : o_cnt;
  assign o_ord_c = o_go ? tag[LMAX][rp[LMAX]] : o_ord;

  assign o_rel      = o_act && (o_addr == order_nlast(o_ord_c));
  assign o_rel_bank = o_go ? rp[LMAX] : o_bank;

  assign out_rd_en   = o_act;
  assign out_rd_bank = o_go ? rp[LMAX] : o_bank;
  assign out_rd_addr = o_addr;

  // ------------------------------------------------------------ bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCOL; c++) begin
        st[c][0]  <= FREE;
        st[c][1]  <= FREE;
        tag[c][0] <= '0;
        tag[c][1] <= '0;
        wp[c]     <= 1'b0;
        rp[c]     <= 1'b0;
      end
      in_cnt <= '0;
      o_run  <= 1'b0;
      o_cnt  <= '0;
      o_ord  <= '0;
      o_bank <= 1'b0;
    end else begin
      // input writer
      if (in_wr_en) begin
        if (frame_start) begin
          st[0][wp[0]]  <= FILL;
          tag[0][wp[0]] <= in_order;
        end
        if (in_wr_addr == in_nlast) begin
          st[0][wp[0]] <= FULL;
          wp[0]        <= ~wp[0];
          in_cnt       <= '0;
        end else begin
          in_cnt <= in_wr_addr + 1'b1;
        end
      end
      // stage completions
      for (int c = 0; c < LMAX; c++) begin
        if (stg_rd_last[c])
          st[c][stg_rd_last_bank[c]] <= FREE;
        if (stg_wr_last[c]) begin
          if (stg_wr_out[c]) st[LMAX][stg_wr_bank[c]] <= FULL;
          else               st[(c+1) % NCOL][stg_wr_bank[c]] <= FULL;
        end
      end
      // output reader
      if (o_go) begin
        st[LMAX][rp[LMAX]] <= READ;
        o_bank             <= rp[LMAX];
        o_ord              <= tag[LMAX][rp[LMAX]];
        rp[LMAX]           <= ~rp[LMAX];
      end
      if (o_act) begin
        if (o_addr == order_nlast(o_ord_c)) begin
          o_run <= 1'b0;
          o_cnt <= '0;
          st[LMAX][o_rel_bank] <= FREE;
        end else begin
          o_run <= 1'b1;
          o_cnt <= o_addr + 1'b1;
        end
      end
      // stage starts: claim source and destination banks
      for (int c = 0; c < LMAX; c++) begin
        if (go[c]) begin
          st[c][rp[c]] <= READ;
          rp[c]        <= ~rp[c];
          if (dst_is_out[c]) begin
            st[LMAX][wp[LMAX]]  <= FILL;
            tag[LMAX][wp[LMAX]] <= tag[c][rp[c]];
            wp[LMAX]            <= ~wp[LMAX];
          end else begin
            st[(c+1) % NCOL][wp[(c+1) % NCOL]]  <= FILL;
            tag[(c+1) % NCOL][wp[(c+1) % NCOL]] <= tag[c][rp[c]];
            wp[(c+1) % NCOL]                    <= ~wp[(c+1) % NCOL];
          end
        end
      end
    end
  end

  // output qualifiers, aligned with the synchronous RAM read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_bin   <= '0;
      out_order <= '0;
    end else begin
      out_valid <= o_act;
      out_first <= o_act && (o_addr == '0);
      out_last  <= o_act && (o_addr == order_nlast(o_ord_c));
      out_bin   <= bit_reverse(o_addr, order_log2(o_ord_c));
      out_order <= o_ord_c;
    end
  end

  // a bank is claimed only when free, and a stage never restarts mid-frame
  a_in_bank_free: assert property (@(posedge clk) disable iff (!rst_n)
    in_wr_en |-> (st[0][wp[0]] == FREE || st[0][wp[0]] == FILL));
  for (genvar g = 0; g < LMAX; g++) begin : g_chk
    a_stage_idle: assert property (@(posedge clk) disable iff (!rst_n)
      go[g] |-> !stg_busy[g]);
  end

endmodule
