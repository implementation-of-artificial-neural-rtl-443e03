// relu_vec: element-wise ReLU with rescaling to the activation format.
//
// Each element is max(0, x) as in the source design's activation, then moved
// from IN_FRAC to OUT_FRAC fraction bits (arithmetic shift, truncating when
// bits are dropped) and clipped to the largest positive OUT_W-bit value. The
// rescaling and the clipping are this design's choice: the wide accumulator
// of a layer has to fit the narrower activation register of the next.
//
// Interface: x[N] (IN_W-bit signed), y[N] (OUT_W-bit signed, never negative).
// Purely combinational.
module relu_vec #(
  parameter int unsigned N        = 20,
  parameter int unsigned IN_W     = 29,
  parameter int unsigned IN_FRAC  = 13,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_FRAC = 8
) (
  input  logic signed [IN_W-1:0]  x [N],
  output logic signed [OUT_W-1:0] y [N]
);

  // working width wide enough for a left shift of the input
  localparam int unsigned LSH = (OUT_FRAC > IN_FRAC) ? OUT_FRAC - IN_FRAC : 0;
  localparam int unsigned RSH = (IN_FRAC > OUT_FRAC) ? IN_FRAC - OUT_FRAC : 0;
  localparam int unsigned WK  = IN_W + LSH;
  localparam logic signed [WK-1:0] MAXV = WK'((64'(1) << (OUT_W - 1)) - 1);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic signed [WK-1:0] v;
      if (x[k] < 0) v = '0;
      else          v = (WK'(x[k]) <<< LSH) >>> RSH;
      if (v > MAXV) y[k] = OUT_W'(MAXV);
      else          y[k] = OUT_W'(v);
    end
  end

endmodule
