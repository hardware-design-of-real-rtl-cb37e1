// twiddle_mem: twiddle factor memory for all four transform orders.
//
// One table holds, for each order N in {64, 32, 16, 8}, the N factors
// W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N), k = 0..N-1 (the second column of
// the N x N DFT matrix), so the total depth is 64+32+16+8 = 120 words. A
// stage reads W at (start address of its order) + k*2^s. Values are Q1.15,
// rounded to nearest, computed at elaboration from the formula above. The
// table is shared by all butterfly stages: each stage has its own
// synchronous read port (data one cycle after the address), which a
// synthesis tool maps to replicated ROMs.
module twiddle_mem
  import fft_pkg::*;
#(
  parameter int unsigned NRD = LMAX  // number of read ports (one per stage)
) (
  input  logic           clk,
  input  logic [NRD-1:0] rd_en,
  input  logic [TAW-1:0] rd_addr [NRD],
  output twid_t          rd_data [NRD]
);

  typedef logic [2*TW-1:0] table_t [TW_DEPTH];

  localparam real PI = 3.14159265358979323846;
  localparam real SC = real'((1 << (TW - 1)) - 1);

  function automatic logic signed [TW-1:0] q15(real v);
    real s;
    s = v * SC;
    return TW'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic table_t make_table();
    table_t t;
    int base;
    int n;
    base = 0;
    for (int o = 0; o < 4; o++) begin
      n = NMAX >> o;
      for (int k = 0; k < n; k++) begin
        t[base + k] = {q15($cos(2.0 * PI * k / n)), q15(-$sin(2.0 * PI * k / n))};
      end
      base += n;
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  for (genvar p = 0; p < NRD; p++) begin : g_port
    always_ff @(posedge clk) begin
      if (rd_en[p]) rd_data[p] <= TABLE[rd_addr[p]];
    end
  end

endmodule
