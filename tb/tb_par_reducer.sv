// tb_par_reducer: end-to-end test of the peak-to-average reducer at its
// default parameters.
//
// Random 16-QAM OFDM symbols (52 used bins, 12 nulls, as a contiguous band)
// are pushed through the design at three settings: no limiting (huge PAR
// limit and window), a 6 dB limit and a 3 dB limit, both with a cartesian
// window of 120 LSB (0.1 of the largest 16-QAM coordinate), then once more
// with a 20 LSB window that forces the cartesian clamp to act. The outputs are compared,
// sample by sample, with a floating-point model of the same algorithm
// (oversampled IFFT, mean-relative power limit by iterated peak scaling,
// decimating FFT, cartesian clamp, 64-point IFFT). The test also counts how
// often each mechanism acted: polar scaling, the peak-count bound, the
// cartesian clamp, and the pass-through case, and fails if one never did.
// It checks the in/out handshake counts with pauses on the input, the
// reported cycle count, and the 749-cycle latency of a symbol with nothing
// to scale (64 load + 201 IFFT + 95 power limit + 268 FFT + 57 IFFT64 + 64
// output).
module tb_par_reducer;
  import par_pkg::*;

  localparam int    UNIT = 400;          // 16-QAM levels +-1, +-3 times UNIT
  localparam int    TOL  = 24;           // LSB tolerance against the model
  localparam int    MAXP = 32;           // power_limiter default MAX_PEAKS

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  logic [15:0]   par_factor;
  logic [DW-2:0] delta;
  logic          in_valid = 1'b0;
  cplx_t         in_data;
  logic          in_ready, out_valid, out_last, busy, done;
  cplx_t         out_data;
  logic [7:0]    n_scaled, n_limited;
  logic [15:0]   cycles;

  par_reducer dut (.*);

  int checks = 0, failures = 0;
  int ev_scaled = 0, ev_capped = 0, ev_limited = 0, ev_clean = 0;

  // ---------------- watchdog ------------------------------------------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model -----------------------------------------
  real xr [64], xi [64];        // constellation points
  real tr [256], ti [256];      // oversampled time signal
  real yr [64], yi [64];        // corrected bins
  real orf [64], oif [64];      // expected output

  function automatic void model(input real factor, input real dl, input int maxp);
    real mean, lim, alim;
    int  nsc;
    for (int n = 0; n < 256; n++) begin
      tr[n] = 0.0; ti[n] = 0.0;
      for (int k = 0; k < 64; k++) begin
        real a;
        a = 2.0 * PI * k * n / 256.0;
        tr[n] += xr[k] * $cos(a) - xi[k] * $sin(a);
        ti[n] += xr[k] * $sin(a) + xi[k] * $cos(a);
      end
      tr[n] /= 8.0; ti[n] /= 8.0;
    end
    mean = 0.0;
    for (int n = 0; n < 256; n++) mean += tr[n]*tr[n] + ti[n]*ti[n];
    mean /= 256.0;
    lim  = mean * factor;
    alim = $sqrt(lim);
    nsc  = 0;
    while (nsc < maxp) begin
      int  best;
      real bp;
      best = 0; bp = -1.0;
      for (int n = 0; n < 256; n++)
        if (tr[n]*tr[n] + ti[n]*ti[n] > bp) begin bp = tr[n]*tr[n] + ti[n]*ti[n]; best = n; end
      if (bp <= lim) break;
      tr[best] *= alim / $sqrt(bp);
      ti[best] *= alim / $sqrt(bp);
      nsc++;
    end
    for (int k = 0; k < 64; k++) begin
      yr[k] = 0.0; yi[k] = 0.0;
      for (int n = 0; n < 256; n++) begin
        real a;
        a = -2.0 * PI * k * n / 256.0;
        yr[k] += tr[n] * $cos(a) - ti[n] * $sin(a);
        yi[k] += tr[n] * $sin(a) + ti[n] * $cos(a);
      end
      yr[k] /= 32.0; yi[k] /= 32.0;
      if (yr[k] > xr[k] + dl) yr[k] = xr[k] + dl;
      if (yr[k] < xr[k] - dl) yr[k] = xr[k] - dl;
      if (yi[k] > xi[k] + dl) yi[k] = xi[k] + dl;
      if (yi[k] < xi[k] - dl) yi[k] = xi[k] - dl;
    end
    for (int n = 0; n < 64; n++) begin
      orf[n] = 0.0; oif[n] = 0.0;
      for (int k = 0; k < 64; k++) begin
        real a;
        a = 2.0 * PI * k * n / 64.0;
        orf[n] += yr[k] * $cos(a) - yi[k] * $sin(a);
        oif[n] += yr[k] * $sin(a) + yi[k] * $cos(a);
      end
      orf[n] /= 8.0; oif[n] /= 8.0;
    end
  endfunction

  // ---------------- output capture ------------------------------------------
  cplx_t got [64];
  int    n_out, n_last;
  always @(posedge clk) if (out_valid) begin
    if (n_out < 64) got[n_out] <= out_data;
    n_out  <= n_out + 1;
    if (out_last) n_last <= n_last + 1;
  end

  function automatic int qam_level();
    int v;
    v = int'($urandom_range(0, 3));
    return (2 * v - 3) * UNIT;
  endfunction

  task automatic run_symbol(input logic [15:0] f, input int dl, input string name);
    int t0, t1, maxerr, accepted, gaps;
    real factor;
    for (int k = 0; k < 64; k++) begin
      // contiguous band -32..31: bin 32 is DC, bins 0..5 and 59..63 are guards
      if (k == 32 || k < 6 || k > 58) begin xr[k] = 0.0; xi[k] = 0.0; end
      else begin xr[k] = real'(qam_level()); xi[k] = real'(qam_level()); end
    end
    factor = real'(f) / 256.0;
    model(factor, real'(dl), MAXP);

    n_out = 0; n_last = 0;
    @(negedge clk);
    par_factor = f; delta = (DW-1)'(dl);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = int'($time / 10);
    accepted = 0;
    gaps = 0;
    while (accepted < 64) begin
      // the source pauses now and then: in_valid low for some cycles
      in_valid = ($urandom_range(0, 4) != 0);
      in_data.re = DW'($rtoi(xr[accepted]));
      in_data.im = DW'($rtoi(xi[accepted]));
      @(posedge clk);
      if (in_ready && in_valid) accepted++;
      else if (!in_valid) gaps++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!done) @(posedge clk);
    t1 = int'($time / 10);
    @(negedge clk);

    checks++;
    if (n_out != 64 || n_last != 1) begin
      failures++;
      $display("%s: %0d outputs, %0d last flags", name, n_out, n_last);
    end
    maxerr = 0;
    for (int n = 0; n < 64; n++) begin
      int er, ei;
      er = int'(got[n].re) - $rtoi(orf[n] + (orf[n] >= 0.0 ? 0.5 : -0.5));
      ei = int'(got[n].im) - $rtoi(oif[n] + (oif[n] >= 0.0 ? 0.5 : -0.5));
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > TOL || ei > TOL) begin
        failures++;
        if (failures < 10)
          $display("%s: sample %0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                   name, n, got[n].re, got[n].im, orf[n], oif[n]);
      end
    end
    // the cycle counter covers start .. done
    checks++;
    if (int'(cycles) != t1 - t0 + 1) begin
      failures++;
      $display("%s: cycles=%0d, measured %0d", name, cycles, t1 - t0 + 1);
    end
    // with nothing to scale a symbol takes 749 cycles plus the input pauses
    if (n_scaled == 0) begin
      checks++;
      if (int'(cycles) != 749 + gaps) begin
        failures++;
        $display("%s: %0d cycles, expected %0d", name, cycles, 749 + gaps);
      end
    end
    $display("%s: cycles=%0d scaled=%0d limited=%0d max error=%0d LSB",
             name, cycles, n_scaled, n_limited, maxerr);
    if (n_scaled != 0)               ev_scaled++;
    if (int'(n_scaled) == MAXP)      ev_capped++;
    if (n_limited != 0)              ev_limited++;
    if (n_scaled == 0 && n_limited == 0) ev_clean++;
  endtask

  initial begin
    par_factor = '0; delta = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // no limiting: PAR limit 255.99, window wider than any rounding error
    run_symbol(16'hffff, 4000, "no limit");
    checks++;
    if (n_scaled != 0 || n_limited != 0) begin
      failures++;
      $display("no limit: unexpected scaled=%0d limited=%0d", n_scaled, n_limited);
    end
    // 6 dB (x3.98) and 3 dB (x2.0) peak limits, window 0.15 * 2*UNIT
    run_symbol(16'h03fc, 120, "6 dB");
    run_symbol(16'h0200, 120, "3 dB");
    run_symbol(16'h0200, 120, "3 dB, second symbol");
    // 3 dB limit with a tight window (0.025 step) so the cartesian clamp acts
    run_symbol(16'h0200, 20, "3 dB, tight window");

    checks += 4;
    if (ev_scaled  == 0) begin failures++; $display("polar scaling never happened"); end
    if (ev_capped  == 0) begin failures++; $display("peak-count bound never reached"); end
    if (ev_limited == 0) begin failures++; $display("cartesian limiter never clamped"); end
    if (ev_clean   == 0) begin failures++; $display("pass-through never happened"); end
    $display("events: scaled=%0d capped=%0d limited=%0d clean=%0d",
             ev_scaled, ev_capped, ev_limited, ev_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
