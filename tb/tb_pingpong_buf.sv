// tb_pingpong_buf: fills bank 0 with one frame, then writes bank 1 while
// reading bank 0 (serial on port A, partner on port B), and the other way
// round, checking that the banks do not disturb each other and that the
// read data follows the bank addressed one cycle earlier.
`timescale 1ns/1ps
module tb_pingpong_buf;
  import fft_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_bank, rd_en, rd_bank;
  logic [5:0] wr_addr, ra, rb;
  cplx_t wr_data, qa, qb;
  cplx_t frame [2][64];
  int checks = 0, failures = 0;

  pingpong_buf #(.DEPTH(64)) dut (
    .clk(clk), .wr_en(wr_en), .wr_bank(wr_bank), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_bank(rd_bank), .rd_addr_a(ra), .rd_addr_b(rb), .rd_data_a(qa), .rd_data_b(qb));

  initial begin
    wr_en = 0; rd_en = 0; wr_bank = 0; rd_bank = 0; wr_addr = 0; ra = 0; rb = 0; wr_data = '0;
    for (int b = 0; b < 2; b++) for (int i = 0; i < 64; i++) frame[b][i] = cplx_t'($urandom);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); wr_en = 1; wr_bank = 0; wr_addr = 6'(i); wr_data = frame[0][i];
    end
    for (int round = 0; round < 4; round++) begin
      int rbk;
      rbk = round % 2;
      for (int i = 0; i < 64; i++) begin
        cplx_t ea, eb;
        @(negedge clk);
        wr_en = 1; wr_bank = 1'(1 - rbk); wr_addr = 6'(i); wr_data = frame[1 - rbk][i];
        rd_en = 1; rd_bank = 1'(rbk); ra = 6'(i); rb = 6'(i ^ 8);
        ea = frame[rbk][i]; eb = frame[rbk][i ^ 8];
        @(posedge clk); #1;
        checks++; if (qa !== ea || qb !== eb) begin failures++; $display("bank %0d addr %0d mismatch", rbk, i); end
      end
      // new data for the bank just read
      for (int i = 0; i < 64; i++) frame[rbk][i] = cplx_t'($urandom);
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); rd_en = 0; wr_en = 1; wr_bank = 1'(rbk); wr_addr = 6'(i); wr_data = frame[rbk][i];
      end
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
