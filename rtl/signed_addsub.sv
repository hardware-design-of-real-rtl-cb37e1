// signed_addsub: the butterfly's signed adder/subtractor.
//
// With sub low it returns a + b (the upper butterfly output); with sub high
// it returns b - a, where a is the serially read sample x[k] and b the
// partner x[k - h], i.e. upper minus lower input (the lower butterfly
// output, before its twiddle). The same enable drives the partner address
// logic in the stage. One bit of growth, purely combinational.
module signed_addsub
  import fft_pkg::*;
(
  input  logic                 sub,
  input  cplx_t                a,
  input  cplx_t                b,
  output logic signed [DW:0]   y_re,
  output logic signed [DW:0]   y_im
);

  always_comb begin
    if (sub) begin
      y_re = (DW+1)'(b.re) - (DW+1)'(a.re);
      y_im = (DW+1)'(b.im) - (DW+1)'(a.im);
    end else begin
      y_re = (DW+1)'(a.re) + (DW+1)'(b.re);
      y_im = (DW+1)'(a.im) + (DW+1)'(b.im);
    end
  end

endmodule
