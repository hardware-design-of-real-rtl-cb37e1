// tb_dual_out_ram: writes random words to random addresses of the frame RAM
// and checks both synchronous read ports against a shadow array, including
// read enable low (outputs hold) and read-during-write (old data returned).
`timescale 1ns/1ps
module tb_dual_out_ram;
  localparam int DEPTH = 64;
  localparam int WIDTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [5:0] wr_addr, ra, rb;
  logic [WIDTH-1:0] wr_data, qa, qb;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  dual_out_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr_a(ra), .rd_addr_b(rb), .rd_data_a(qa), .rd_data_b(qb));

  initial begin
    logic [WIDTH-1:0] ea, eb;
    wr_en = 0; rd_en = 0; ra = 0; rb = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = $urandom; shadow[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      ra = 6'($urandom); rb = 6'($urandom); rd_en = 1;
      wr_en = 1'($urandom_range(0, 1)); wr_addr = ($urandom_range(0, 1) != 0) ? ra : 6'($urandom); wr_data = $urandom;
      ea = shadow[ra]; eb = shadow[rb];
      @(posedge clk); #1;
      if (wr_en) shadow[wr_addr] = wr_data;
      checks++; if (qa !== ea) begin failures++; $display("port A mismatch"); end
      checks++; if (qb !== eb) begin failures++; $display("port B mismatch"); end
      // read enable low: outputs hold
      @(negedge clk); rd_en = 0; wr_en = 0; ra = ra + 1; rb = rb + 1;
      @(posedge clk); #1;
      checks++; if (qa !== ea || qb !== eb) begin failures++; $display("hold failed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
