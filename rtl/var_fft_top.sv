// var_fft_top: real-time configurable variable-point FFT (8/16/32/64 points).
//
// A continuous complex stream (I and Q, DW bits each, one sample per clock)
// is cut into frames of N = 64, 32, 16 or 8 samples; the 2-bit point_sel
// input picks N for each frame (00 = 64, 01 = 32, 10 = 16, 11 = 8) and is
// sampled on the frame's first sample, so the order can change from one
// frame to the next without stopping the stream.
//
// Structure (the block diagram of the design): a chain of ping-pong frame
// buffers, column 0 for the input and column s feeding butterfly stage s
// (s = 0..5), each stage made of the partner-address read logic, a signed
// adder/subtractor, a complex multiplier of the multiplier bank and a
// scaling circuit; the result goes into column s+1. One twiddle memory
// holds the factors of all four orders and serves every stage; each stage
// has its own start address register. A frame of order N uses stages
// 0..log2(N)-1; the last of them writes into the output buffer (column 6),
// which is read out serially. All processing happens while the next frame
// is being buffered, so at a fixed order one result leaves per cycle.
//
// Result: out_data = X[k] / N (each stage halves), delivered in bit-reversed
// bin order; out_bin gives k for each sample, out_first/out_last frame it
// and out_order gives its order. Latency at a fixed order, from the first
// input sample of a frame to its first output sample: N + log2(N)*(N+1) + 1
// cycles. in_ready drops only when a shorter frame follows a longer one
// faster than the longer one can leave the input buffer.
// The block structure, the per-frame reconfiguration and the one-table
// twiddle store follow the published architecture; widths, scaling, the
// handshake and the order codes 01/11 are this design's choices.
module var_fft_top
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  cplx_t         in_data,
  input  order_t        point_sel,
  output logic          out_valid,
  output cplx_t         out_data,
  output logic [AW-1:0] out_bin,
  output order_t        out_order,
  output logic          out_first,
  output logic          out_last,
  output logic          order_change
);

  // ------------------------------------------------------------- config
  logic          frame_start;
  order_t        in_order;
  logic [AW-1:0] in_nlast;

  config_regs u_cfg (
    .clk         (clk),
    .rst_n       (rst_n),
    .frame_start (frame_start),
    .point_sel   (point_sel),
    .order       (in_order),
    .nlast       (in_nlast),
    .order_change(order_change)
  );

  // ----------------------------------------------------------- control
  logic          in_wr_en, in_wr_bank;
  logic [AW-1:0] in_wr_addr;
  logic [LMAX-1:0] stg_start, stg_src_bank, stg_dst_bank, stg_dst_out, stg_busy;
  logic [LMAX-1:0] stg_rd_last, stg_rd_last_bank, stg_wr_last, stg_wr_bank, stg_wr_out;
  order_t          stg_order [LMAX];
  logic          out_rd_en, out_rd_bank;
  logic [AW-1:0] out_rd_addr;

  sync_ctrl u_sync (
    .clk             (clk),
    .rst_n           (rst_n),
    .in_valid        (in_valid),
    .in_ready        (in_ready),
    .frame_start     (frame_start),
    .in_order        (in_order),
    .in_nlast        (in_nlast),
    .in_wr_en        (in_wr_en),
    .in_wr_bank      (in_wr_bank),
    .in_wr_addr      (in_wr_addr),
    .stg_start       (stg_start),
    .stg_order       (stg_order),
    .stg_src_bank    (stg_src_bank),
    .stg_dst_bank    (stg_dst_bank),
    .stg_dst_out     (stg_dst_out),
    .stg_busy        (stg_busy),
    .stg_rd_last     (stg_rd_last),
    .stg_rd_last_bank(stg_rd_last_bank),
    .stg_wr_last     (stg_wr_last),
    .stg_wr_bank     (stg_wr_bank),
    .stg_wr_out      (stg_wr_out),
    .out_rd_en       (out_rd_en),
    .out_rd_bank     (out_rd_bank),
    .out_rd_addr     (out_rd_addr),
    .out_valid       (out_valid),
    .out_first       (out_first),
    .out_last        (out_last),
    .out_bin         (out_bin),
    .out_order       (out_order)
  );

  // -------------------------------------------------------- twiddles
  logic [LMAX-1:0] tw_en;
  logic [TAW-1:0]  tw_addr [LMAX];
  twid_t           tw_data [LMAX];

  twiddle_mem #(.NRD(LMAX)) u_twiddle (
    .clk    (clk),
    .rd_en  (tw_en),
    .rd_addr(tw_addr),
    .rd_data(tw_data)
  );

  // ------------------------------------------- columns and stages
  // column write ports: column 0 from the input, column c+1 from stage c
  logic          col_wr_en   [LMAX+1];
  logic          col_wr_bank [LMAX+1];
  logic [AW-1:0] col_wr_addr [LMAX+1];
  cplx_t         col_wr_data [LMAX+1];
  // column read ports
  logic          col_rd_en   [LMAX+1];
  logic          col_rd_bank [LMAX+1];
  logic [AW-1:0] col_rd_a    [LMAX+1];
  logic [AW-1:0] col_rd_b    [LMAX+1];
  cplx_t         col_q_a     [LMAX+1];
  cplx_t         col_q_b     [LMAX+1];
  // stage write sides
  logic [LMAX-1:0] s_wr_en;
  logic [AW-1:0]   s_wr_addr [LMAX];
  cplx_t           s_wr_data [LMAX];

  assign col_wr_en[0]   = in_wr_en;
  assign col_wr_bank[0] = in_wr_bank;
  assign col_wr_addr[0] = in_wr_addr;
  assign col_wr_data[0] = in_data;

  for (genvar c = 0; c < LMAX; c++) begin : g_stage
    fft_stage #(.STAGE(c)) u_stage (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (stg_start[c]),
      .order       (stg_order[c]),
      .src_bank    (stg_src_bank[c]),
      .dst_bank    (stg_dst_bank[c]),
      .dst_out     (stg_dst_out[c]),
      .busy        (stg_busy[c]),
      .rd_en       (col_rd_en[c]),
      .rd_bank     (col_rd_bank[c]),
      .rd_addr_a   (col_rd_a[c]),
      .rd_addr_b   (col_rd_b[c]),
      .rd_data_a   (col_q_a[c]),
      .rd_data_b   (col_q_b[c]),
      .rd_last     (stg_rd_last[c]),
      .rd_last_bank(stg_rd_last_bank[c]),
      .tw_en       (tw_en[c]),
      .tw_addr     (tw_addr[c]),
      .tw_data     (tw_data[c]),
      .wr_en       (s_wr_en[c]),
      .wr_bank     (stg_wr_bank[c]),
      .wr_out      (stg_wr_out[c]),
      .wr_addr     (s_wr_addr[c]),
      .wr_data     (s_wr_data[c]),
      .wr_last     (stg_wr_last[c])
    );

    // stage c writes column c+1 unless its frame ends here
    if (c + 1 < LMAX) begin : g_next
      assign col_wr_en[c+1]   = s_wr_en[c] && !stg_wr_out[c];
      assign col_wr_bank[c+1] = stg_wr_bank[c];
      assign col_wr_addr[c+1] = s_wr_addr[c];
      assign col_wr_data[c+1] = s_wr_data[c];
    end
  end

  // output buffer: written by the last stage of the frame's order
  always_comb begin
    col_wr_en[LMAX]   = 1'b0;
    col_wr_bank[LMAX] = 1'b0;
    col_wr_addr[LMAX] = '0;
    col_wr_data[LMAX] = '0;
    for (int c = 0; c < LMAX; c++) begin
      if (s_wr_en[c] && stg_wr_out[c]) begin
        col_wr_en[LMAX]   = 1'b1;
        col_wr_bank[LMAX] = stg_wr_bank[c];
        col_wr_addr[LMAX] = s_wr_addr[c];
        col_wr_data[LMAX] = s_wr_data[c];
      end
    end
  end

  assign col_rd_en[LMAX]   = out_rd_en;
  assign col_rd_bank[LMAX] = out_rd_bank;
  assign col_rd_a[LMAX]    = out_rd_addr;
  assign col_rd_b[LMAX]    = out_rd_addr;

  for (genvar c = 0; c <= LMAX; c++) begin : g_col
    pingpong_buf #(.DEPTH(NMAX)) u_col (
      .clk      (clk),
      .wr_en    (col_wr_en[c]),
      .wr_bank  (col_wr_bank[c]),
      .wr_addr  (col_wr_addr[c]),
      .wr_data  (col_wr_data[c]),
      .rd_en    (col_rd_en[c]),
      .rd_bank  (col_rd_bank[c]),
      .rd_addr_a(col_rd_a[c]),
      .rd_addr_b(col_rd_b[c]),
      .rd_data_a(col_q_a[c]),
      .rd_data_b(col_q_b[c])
    );
  end

  assign out_data = col_q_a[LMAX];

endmodule
