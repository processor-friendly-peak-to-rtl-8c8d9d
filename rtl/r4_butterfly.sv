// r4_butterfly: pipelined radix-4 butterfly with a built-in cartesian
// limiter stage.
//
// One butterfly is accepted per cycle. Stage 1 optionally multiplies inputs
// 1..3 by their twiddles (decimation in time, dit=1) and forms the 4-point
// DFT; stage 2 optionally multiplies outputs 1..3 by their twiddles
// (decimation in frequency, dit=0), shifts right by `shift` bits with
// rounding and saturates to DW bits; stage 3 is the extra pipeline stage
// that holds the cartesian limiter, which clamps every output to within
// delta of its reference point when lim_en is set and passes it otherwise.
// Putting the limiter behind the butterfly as one more register stage is the
// integration the soft-clipping accelerator calls for: the limit is applied
// while the last FFT stage runs, at no extra cycles.
//
// inverse=1 uses W4 = +j (inverse transform); the caller supplies the
// matching conjugated twiddles. Twiddles are Q1.14; products are rounded.
// Latency is BF_LATENCY = 3 cycles from in_valid to out_valid; control and
// reference inputs are sampled with the data. Internal word width, rounding
// and saturation are this design's choices.
module r4_butterfly
  import par_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         a      [4],
  input  twid_t         w      [1:3],
  input  logic          dit,
  input  logic          inverse,
  input  logic [1:0]    shift,
  input  logic          lim_en,
  input  cplx_t         ref_pt [4],
  input  logic [DW-2:0] delta,
  output logic          out_valid,
  output cplx_t         y      [4],
  output logic [3:0]    limited
);
  localparam int IW = DW + 4;  // internal width: 2 bits of DFT growth + twiddle headroom

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } wide_t;

  function automatic wide_t cmul(input wide_t x, input twid_t t);
    logic signed [IW+TW:0] pr, pi;
    wide_t r;
    pr = (IW+TW+1)'(x.re) * (IW+TW+1)'(t.re) - (IW+TW+1)'(x.im) * (IW+TW+1)'(t.im);
    pi = (IW+TW+1)'(x.re) * (IW+TW+1)'(t.im) + (IW+TW+1)'(x.im) * (IW+TW+1)'(t.re);
    pr = pr + (IW+TW+1)'(1 <<< (TW_FRAC-1));
    pi = pi + (IW+TW+1)'(1 <<< (TW_FRAC-1));
    r.re = IW'(pr >>> TW_FRAC);
    r.im = IW'(pi >>> TW_FRAC);
    return r;
  endfunction

  function automatic wide_t widen(input cplx_t x);
    wide_t r;
    r.re = IW'(x.re);
    r.im = IW'(x.im);
    return r;
  endfunction

  // ---------------- stage 1: pre-twiddle (DIT) and 4-point DFT -----------
  wide_t b [4];
  wide_t d [4];

  always_comb begin
    b[0] = widen(a[0]);
    for (int i = 1; i < 4; i++)
      b[i] = dit ? cmul(widen(a[i]), w[i]) : widen(a[i]);
  end

  always_comb begin
    wide_t s02, d02, s13, d13, jd13;
    s02.re = b[0].re + b[2].re;  s02.im = b[0].im + b[2].im;
    d02.re = b[0].re - b[2].re;  d02.im = b[0].im - b[2].im;
    s13.re = b[1].re + b[3].re;  s13.im = b[1].im + b[3].im;
    d13.re = b[1].re - b[3].re;  d13.im = b[1].im - b[3].im;
    // jd13 = -j*d13 for the forward transform, +j*d13 for the inverse
    if (!inverse) begin jd13.re =  d13.im; jd13.im = -d13.re; end
    else          begin jd13.re = -d13.im; jd13.im =  d13.re; end
    d[0].re = s02.re + s13.re;   d[0].im = s02.im + s13.im;
    d[1].re = d02.re + jd13.re;  d[1].im = d02.im + jd13.im;
    d[2].re = s02.re - s13.re;   d[2].im = s02.im - s13.im;
    d[3].re = d02.re - jd13.re;  d[3].im = d02.im - jd13.im;
  end

  wide_t      s1_d [4];
  twid_t      s1_w [1:3];
  cplx_t      s1_ref [4], s2_ref [4];
  logic       s1_v, s1_dit, s1_lim, s2_v, s2_lim;
  logic [1:0] s1_shift;
  logic [DW-2:0] s1_delta, s2_delta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
    end else begin
      s1_v <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_d     <= d;
      s1_w     <= w;
      s1_dit   <= dit;
      s1_shift <= shift;
      s1_lim   <= lim_en;
      s1_ref   <= ref_pt;
      s1_delta <= delta;
    end
  end

  // ---------------- stage 2: post-twiddle (DIF), scale, saturate ---------
  cplx_t e [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      wide_t t;
      logic signed [IW:0] rr, ri;
      t = (i != 0 && !s1_dit) ? cmul(s1_d[i], s1_w[i]) : s1_d[i];
      rr = (IW+1)'(t.re);
      ri = (IW+1)'(t.im);
      if (s1_shift != 2'd0) begin
        rr = (rr + (IW+1)'(1 <<< (s1_shift - 1))) >>> s1_shift;
        ri = (ri + (IW+1)'(1 <<< (s1_shift - 1))) >>> s1_shift;
      end
      e[i].re = sat_dw(32'(rr));
      e[i].im = sat_dw(32'(ri));
    end
  end

  cplx_t s2_y [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= s1_v;
  end

  always_ff @(posedge clk) begin
    if (s1_v) begin
      s2_y     <= e;
      s2_lim   <= s1_lim;
      s2_ref   <= s1_ref;
      s2_delta <= s1_delta;
    end
  end

  // ---------------- stage 3: cartesian limiter ---------------------------
  cplx_t      lim_y [4];
  logic [3:0] lim_re, lim_im;

  for (genvar g = 0; g < 4; g++) begin : g_lim
    cartesian_limiter u_cl (
      .x(s2_y[g]), .ref_pt(s2_ref[g]), .delta(s2_delta),
      .y(lim_y[g]), .limited_re(lim_re[g]), .limited_im(lim_im[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      limited   <= '0;
    end else begin
      out_valid <= s2_v;
      if (s2_v) limited <= s2_lim ? (lim_re | lim_im) : 4'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (s2_v) y <= s2_lim ? lim_y : s2_y;
  end

endmodule
