// cartesian_limiter: complex cartesian limiter. The real and the imaginary
// parts are limited independently, each by a real_limiter, to within delta
// of the desired constellation point. No rectangular/polar conversion is
// needed, which is the point of the cartesian method; the price is that the
// phase of a limited sample may move slightly. Combinational.
module cartesian_limiter
  import par_pkg::*;
(
  input  cplx_t        x,
  input  cplx_t        ref_pt,
  input  logic [DW-2:0] delta,
  output cplx_t        y,
  output logic         limited_re,
  output logic         limited_im
);
  real_limiter #(.W(DW)) u_re (
    .x(x.re), .ref_x(ref_pt.re), .delta(delta), .y(y.re), .limited(limited_re)
  );
  real_limiter #(.W(DW)) u_im (
    .x(x.im), .ref_x(ref_pt.im), .delta(delta), .y(y.im), .limited(limited_im)
  );
endmodule
