// real_limiter: limits one real component (I or Q) to a window around the
// desired constellation coordinate.
//
//   y = x              if ref - delta <= x <= ref + delta
//   y = ref - delta    if x < ref - delta
//   y = ref + delta    if x > ref + delta
//
// This is the limiter rule of the cartesian soft limiter. The window edges
// are formed one bit wider than the data and saturated to W bits, so a
// reference near full scale does not wrap around. Purely combinational; the
// enclosing butterfly registers the result. `limited` flags that the input
// was outside the window. delta is a non-negative magnitude.
module real_limiter #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] ref_x,
  input  logic        [W-2:0] delta,
  output logic signed [W-1:0] y,
  output logic                limited
);
  localparam logic signed [W:0] MAXV = (W+1)'((1 <<< (W-1)) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(1 <<< (W-1));

  logic signed [W:0] lo, hi, xe;

  always_comb begin
    xe = (W+1)'(x);
    lo = (W+1)'(ref_x) - (W+1)'($signed({1'b0, delta}));
    hi = (W+1)'(ref_x) + (W+1)'($signed({1'b0, delta}));
    if (lo < MINV) lo = MINV;
    if (hi > MAXV) hi = MAXV;
    if (xe < lo) begin
      y = lo[W-1:0];
      limited = 1'b1;
    end else if (xe > hi) begin
      y = hi[W-1:0];
      limited = 1'b1;
    end else begin
      y = x;
      limited = 1'b0;
    end
  end
endmodule
