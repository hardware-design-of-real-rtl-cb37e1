// fft_stage: one radix-2 decimation-in-frequency butterfly stage.
//
// The stage reads a whole frame of N samples out of its column of frame
// RAMs and writes the N results into the next column, one sample per cycle.
// Port A of the RAM is read in serial order k = 0..N-1; port B at the
// partner address k XOR h, where h = N / 2^(s+1) is the butterfly span of
// stage s. The enable bit (k AND h) selects the operation and the output:
//   k in the upper half of its group:  y[k] = (x[k] + x[k+h]) / 2
//   k in the lower half:               y[k] = (x[k-h] - x[k]) * W / 2,
//   W = W_N^((k mod h) * 2^s), read from the twiddle memory at
//   start address of the order + (k mod h) * 2^s.
// The result therefore lands at address k of the next column, which is the
// in-place DIF flow graph; after log2(N) stages the spectrum is in
// bit-reversed order.
//
// Timing: start (one cycle) latches the frame's order and the source and
// destination banks and issues the first read in the same cycle. Reads run
// for N cycles (rd_last on the last). RAM and twiddle reads are registered,
// and the add, multiply and scaling are combinational, so each result is
// written the cycle after its read (wr_last on the last write). A new start
// is accepted the cycle after rd_last, so frames follow back to back.
// The serial/partner addressing, the enable-controlled adder and the
// adder-multiplier-scaler chain follow the published architecture; the
// exact address formula, the multiplier bypass on the upper output and the
// one-cycle read pipeline are this design's.
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned STAGE = 0   // stage index s, 0 = first
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the synchronization logic
  input  logic           start,
  input  order_t         order,
  input  logic           src_bank,
  input  logic           dst_bank,
  input  logic           dst_out,     // destination is the output buffer
  output logic           busy,
  // read side (source column)
  output logic           rd_en,
  output logic           rd_bank,
  output logic [AW-1:0]  rd_addr_a,
  output logic [AW-1:0]  rd_addr_b,
  input  cplx_t          rd_data_a,
  input  cplx_t          rd_data_b,
  output logic           rd_last,
  output logic           rd_last_bank,
  // twiddle memory port
  output logic           tw_en,
  output logic [TAW-1:0] tw_addr,
  input  twid_t          tw_data,
  // write side (next column or output buffer)
  output logic           wr_en,
  output logic           wr_bank,
  output logic           wr_out,
  output logic [AW-1:0]  wr_addr,
  output cplx_t          wr_data,
  output logic           wr_last
);

  // frame state
  logic          run_q;
  logic [AW-1:0] k_q;
  order_t        ord_q;
  logic          src_q, dst_q, out_q;

  order_t        ord_c;
  logic [AW-1:0] k_c;
  logic [AW-1:0] nlast_c;
  logic [AW-1:0] span_c;
  logic [TAW-1:0] base_c;
  logic          active_c;

  assign ord_c    = start ? order : ord_q;
  assign k_c      = start ? '0 : k_q;
  assign active_c = start || run_q;
  assign nlast_c  = order_nlast(ord_c);
  // h = N >> (s+1); N = nlast + 1
  assign span_c   = AW'((32'(nlast_c) + 32'd1) >> (STAGE + 1));

  start_addr_reg u_start (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (start),
    .order     (order),
    .start_addr(base_c)
  );

  // read and twiddle address generation
  assign rd_en     = active_c;
  assign rd_bank   = start ? src_bank : src_q;
  assign rd_addr_a = k_c;
  assign rd_addr_b = k_c ^ span_c;
  assign tw_en     = active_c;
  assign tw_addr   = base_c + TAW'((32'(k_c) & (32'(span_c) - 32'd1)) << STAGE);
  // the last read is never in the start cycle (N >= 8), so rd_last comes
  // from registered state only
  assign rd_last   = run_q && (k_q == order_nlast(ord_q));
  assign rd_last_bank = src_q;
  assign busy      = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      k_q   <= '0;
      ord_q <= '0;
      src_q <= 1'b0;
      dst_q <= 1'b0;
      out_q <= 1'b0;
    end else begin
      if (start) begin
        ord_q <= order;
        src_q <= src_bank;
        dst_q <= dst_bank;
        out_q <= dst_out;
      end
      if (active_c) begin
        run_q <= (k_c != nlast_c);
        k_q   <= k_c + 1'b1;
      end
    end
  end

  // one-cycle pipeline alongside the registered RAM / twiddle reads
  logic          v_d, sub_d, last_d, bank_d, out_d;
  logic [AW-1:0] addr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d    <= 1'b0;
      sub_d  <= 1'b0;
      last_d <= 1'b0;
      bank_d <= 1'b0;
      out_d  <= 1'b0;
      addr_d <= '0;
    end else begin
      v_d    <= active_c;
      sub_d  <= |(k_c & span_c);
      last_d <= rd_last;
      bank_d <= start ? dst_bank : dst_q;
      out_d  <= start ? dst_out : out_q;
      addr_d <= k_c;
    end
  end

  // signed adder / subtractor
  logic signed [DW:0] s_re, s_im;
  signed_addsub u_addsub (
    .sub (sub_d),
    .a   (rd_data_a),
    .b   (rd_data_b),
    .y_re(s_re),
    .y_im(s_im)
  );

  // twiddle multiply on the lower butterfly output
  logic signed [DW+1:0] m_re, m_im;
  cmult #(.IW(DW + 1), .TW(TW)) u_mult (
    .x_re(s_re),
    .x_im(s_im),
    .w_re(tw_data.re),
    .w_im(tw_data.im),
    .y_re(m_re),
    .y_im(m_im)
  );

  logic signed [DW+1:0] p_re, p_im;
  assign p_re = sub_d ? m_re : (DW+2)'(s_re);
  assign p_im = sub_d ? m_im : (DW+2)'(s_im);

  scaler #(.IW(DW + 2), .OW(DW)) u_scale_re (.x(p_re), .y(wr_data.re));
  scaler #(.IW(DW + 2), .OW(DW)) u_scale_im (.x(p_im), .y(wr_data.im));

  assign wr_en   = v_d;
  assign wr_bank = bank_d;
  assign wr_out  = out_d;
  assign wr_addr = addr_d;
  assign wr_last = v_d && last_d;

endmodule
