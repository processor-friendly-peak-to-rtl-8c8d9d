// par_pkg: types and constants shared by the peak-to-average reduction datapath.
//
// Samples are complex fixed-point numbers with DW-bit signed I and Q parts.
// Twiddle factors are Q1.14 (16384 represents 1.0). The twiddle table
// W_256^m = exp(-j*2*pi*m/256), m = 0..255, is computed here at elaboration
// time from $cos/$sin, so no data file is needed. A 64-point transform uses
// every fourth entry. The word widths and the Q formats are this design's
// own choices; the 256/64-point sizes follow the 4x oversampled IEEE 802.11a
// symbol the algorithm is built for.
package par_pkg;

  localparam int DW        = 16;   // bits of I and of Q
  localparam int TW        = 16;   // twiddle bits (Q1.14)
  localparam int TW_FRAC   = 14;
  localparam int NFFT      = 256;  // oversampled transform length
  localparam int NSUB      = 64;   // subcarriers of one symbol
  localparam int AW        = 8;    // sample memory address bits
  localparam int BF_LATENCY = 3;   // butterfly: multiply/DFT, post-multiply, limiter

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  typedef logic [AW-1:0] addr_t;

  // Transform kinds run by the FFT engine.
  typedef enum logic [1:0] {
    XF_IFFT256_UP   = 2'd0,  // DIT inverse, 256 points, first stage skipped (zero padded input)
    XF_FFT256_DOWN  = 2'd1,  // DIF forward, 256 points, only the first 64 bins kept and limited
    XF_IFFT64       = 2'd2   // DIT inverse, 64 points on addresses 0..63
  } xform_e;

  localparam real PI = 3.14159265358979323846;

  typedef logic [NFFT-1:0][2*TW-1:0] twid_table_t;  // entry m = {re, im}

  function automatic twid_table_t make_twiddles();
    twid_table_t t;
    for (int m = 0; m < NFFT; m++) begin
      real c, s;
      logic [TW-1:0] cr, si;
      c = $cos(2.0 * PI * m / NFFT) * real'(1 << TW_FRAC);
      s = -$sin(2.0 * PI * m / NFFT) * real'(1 << TW_FRAC);
      cr = TW'($rtoi(c + (c >= 0.0 ? 0.5 : -0.5)));
      si = TW'($rtoi(s + (s >= 0.0 ? 0.5 : -0.5)));
      t[m] = {cr, si};
    end
    return t;
  endfunction

  localparam twid_table_t TWIDDLE = make_twiddles();

  // Saturate a wider signed value to DW bits.
  function automatic logic signed [DW-1:0] sat_dw(input logic signed [31:0] v);
    if (v > 32'sd32767)       return 16'sh7fff;
    else if (v < -32'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

  // Reverse the base-4 digits of a 6-bit index (3 digits).
  function automatic logic [5:0] rev4_3(input logic [5:0] v);
    return {v[1:0], v[3:2], v[5:4]};
  endfunction

endpackage
