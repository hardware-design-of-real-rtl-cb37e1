// fft_pkg: types and constants shared by the configurable streaming FFT.
//
// The FFT runs one of four transform orders, chosen per frame by a 2-bit
// point select: 00 -> 64, 01 -> 32, 10 -> 16, 11 -> 8 points. The codes for
// 64 and 16 points are the ones the design was demonstrated with; 32 and 8
// complete the four orders with the same "6 - code" rule (a design choice).
// All twiddle factors of the four orders sit in one memory, one region per
// order, each region holding W_N^k for k = 0..N-1. The regions are laid out
// largest first: 64 at 0, 32 at 64, 16 at 96, 8 at 112 (120 words in all).
package fft_pkg;

  localparam int unsigned DW      = 16;   // I and Q sample width
  localparam int unsigned TW      = 16;   // twiddle width, Q1.15
  localparam int unsigned LMAX    = 6;    // log2 of the largest order
  localparam int unsigned NMAX    = 1 << LMAX;
  localparam int unsigned AW      = LMAX; // frame RAM address width
  localparam int unsigned TW_DEPTH = 64 + 32 + 16 + 8;
  localparam int unsigned TAW     = 7;    // twiddle memory address width

  typedef logic [1:0] order_t;            // point select code

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  // log2 of the number of points of an order code
  function automatic logic [2:0] order_log2(order_t o);
    return 3'(LMAX - o);
  endfunction

  // number of points minus one (frame counter terminal value)
  function automatic logic [AW-1:0] order_nlast(order_t o);
    return AW'((NMAX >> o) - 1);
  endfunction

  // first word of the order's region in the twiddle memory
  function automatic logic [TAW-1:0] order_tw_base(order_t o);
    unique case (o)
      2'd0:    return TAW'(0);
      2'd1:    return TAW'(64);
      2'd2:    return TAW'(96);
      default: return TAW'(112);
    endcase
  endfunction

  // reverse the low 'bits' bits of an index (output bin of a serial position)
  function automatic logic [AW-1:0] bit_reverse(logic [AW-1:0] v, logic [2:0] bits);
    logic [AW-1:0] r;
    r = '0;
    for (int i = 0; i < AW; i++)
      if (i < int'(bits)) r[int'(bits) - 1 - i] = v[i];
    return r;
  endfunction

endpackage
