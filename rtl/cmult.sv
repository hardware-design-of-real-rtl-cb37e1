// cmult: complex multiplier of the multiplier bank.
//
// (xr + j xi)(wr + j wi) = (xr wr - xi wi) + j (xr wi + xi wr), built from
// four real multipliers and two adders, as in the design. The twiddle is a
// Q1.15 number, so the products are shifted right by TW-1 bits (truncation
// towards minus infinity) and returned with IW+1 bits, which holds any
// result of |w| <= 1. Purely combinational. The four-multiplier structure
// follows the published architecture; Q1.15 twiddles and truncation are this
// design's choices.
module cmult #(
  parameter int unsigned IW = 17,  // operand width
  parameter int unsigned TW = 16   // twiddle width, Q1.(TW-1)
) (
  input  logic signed [IW-1:0] x_re,
  input  logic signed [IW-1:0] x_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [IW:0]   y_re,
  output logic signed [IW:0]   y_im
);

  localparam int unsigned PW = IW + TW + 1;

  logic signed [IW+TW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [PW-1:0]    s_re, s_im;

  always_comb begin
    p_rr = x_re * w_re;
    p_ii = x_im * w_im;
    p_ri = x_re * w_im;
    p_ir = x_im * w_re;
    s_re = PW'(p_rr) - PW'(p_ii);
    s_im = PW'(p_ri) + PW'(p_ir);
    y_re = (IW+1)'(s_re >>> (TW - 1));
    y_im = (IW+1)'(s_im >>> (TW - 1));
  end

endmodule
