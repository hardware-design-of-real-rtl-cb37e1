// dual_out_ram: frame buffer RAM with one write port and two read ports.
//
// One word holds the I and Q parts of one complex sample. Port A is read in
// serial order by the butterfly stage, port B at the reordered (partner)
// address, so that the two butterfly operands leave the RAM in the same
// cycle. Both reads are synchronous: the data appears the cycle after the
// address, qualified by the read enable. A write and a read to the same
// address in one cycle return the old word. Depth is the largest order.
// The one-write/two-read organisation follows the published architecture;
// synchronous reads and the packed I/Q word are this design's choices.
module dual_out_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr_a,
  input  logic [AW-1:0]    rd_addr_b,
  output logic [WIDTH-1:0] rd_data_a,
  output logic [WIDTH-1:0] rd_data_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data_a <= mem[rd_addr_a];
      rd_data_b <= mem[rd_addr_b];
    end
  end

endmodule
