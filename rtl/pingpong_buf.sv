// pingpong_buf: one column of the frame RAM array, two alternating banks.
//
// While one bank receives a frame, the other bank is read by the stage that
// follows, so data flows continuously through the column. Each bank is a
// dual_out_ram (one write port, two read ports). The writer names the bank
// in wr_bank, the reader in rd_bank; the read data is taken from the bank
// that was addressed one cycle earlier (synchronous read, one cycle latency).
// Two banks per column follow the published block diagram; the bank-select
// interface is this design's own.
module pingpong_buf
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = NMAX,
  localparam int unsigned A = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         wr_en,
  input  logic         wr_bank,
  input  logic [A-1:0] wr_addr,
  input  cplx_t        wr_data,
  input  logic         rd_en,
  input  logic         rd_bank,
  input  logic [A-1:0] rd_addr_a,
  input  logic [A-1:0] rd_addr_b,
  output cplx_t        rd_data_a,
  output cplx_t        rd_data_b
);

  cplx_t da [2];
  cplx_t db [2];
  logic  rd_bank_q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dual_out_ram #(.DEPTH(DEPTH), .WIDTH($bits(cplx_t))) u_ram (
      .clk      (clk),
      .wr_en    (wr_en && (wr_bank == 1'(b))),
      .wr_addr  (wr_addr),
      .wr_data  (wr_data),
      .rd_en    (rd_en && (rd_bank == 1'(b))),
      .rd_addr_a(rd_addr_a),
      .rd_addr_b(rd_addr_b),
      .rd_data_a(da[b]),
      .rd_data_b(db[b])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_bank_q <= rd_bank;
  end

  assign rd_data_a = da[rd_bank_q];
  assign rd_data_b = db[rd_bank_q];

endmodule
