// scaler: the scaling circuit after each butterfly.
//
// Each stage grows the data by up to one bit (the add) plus the complex
// multiply. The scaler divides by 2 with round-half-up (add 1, shift right
// by one) and saturates to the DW-bit data width, so a transform of N
// points returns X[k]/N. The halving per stage and the saturation are this
// design's choice of "trimming to the required resolution". Combinational.
module scaler #(
  parameter int unsigned IW = 18,  // input width
  parameter int unsigned OW = 16   // output width
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] y
);

  localparam logic signed [IW-1:0] MAXV = IW'((1 << (OW - 1)) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(1 << (OW - 1));

  logic signed [IW:0]   r;
  logic signed [IW-1:0] h;

  always_comb begin
    r = (IW+1)'(x) + (IW+1)'(1);
    h = IW'(r >>> 1);
    if (h > MAXV)      y = OW'(MAXV);
    else if (h < MINV) y = OW'(MINV);
    else               y = OW'(h);
  end

endmodule
