// tb_r4_butterfly: drives the radix-4 butterfly with random operands and
// random twiddles in every mode (DIT/DIF, forward/inverse, shift 0..2,
// limiter on/off), back-to-back and with gaps, and compares each output
// with a floating-point butterfly (tolerance 2 LSB). It checks that every
// result appears exactly BF_LATENCY = 3 cycles after its input and that the
// limited flags match the clamps the model applied.
module tb_r4_butterfly;
  import par_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, dit, inverse, lim_en, out_valid;
  logic [1:0] shift;
  cplx_t a [4], r [4], y [4];
  twid_t w [1:3];
  logic [DW-2:0] delta;
  logic [3:0] limited;

  r4_butterfly dut (.*, .ref_pt(r));

  int checks = 0, failures = 0, n_clamped = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ex_re [4096][4], ex_im [4096][4];
  bit  ex_lim [4096][4];
  int  ex_t [4096];
  int  n_push = 0, n_pop = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void model();
    real br [4], bi [4], cr [4], ci [4], sg;
    sg = inverse ? 1.0 : -1.0;   // W4 = exp(sg * j*pi/2)
    for (int p = 0; p < 4; p++) begin
      br[p] = real'(a[p].re); bi[p] = real'(a[p].im);
      if (dit && p > 0) begin
        br[p] = real'(a[p].re) * real'(w[p].re) / 16384.0 - real'(a[p].im) * real'(w[p].im) / 16384.0;
        bi[p] = real'(a[p].re) * real'(w[p].im) / 16384.0 + real'(a[p].im) * real'(w[p].re) / 16384.0;
      end
    end
    for (int k = 0; k < 4; k++) begin
      cr[k] = 0.0; ci[k] = 0.0;
      for (int p = 0; p < 4; p++) begin
        real ang;
        ang = sg * PI / 2.0 * ((p * k) % 4);
        cr[k] += br[p] * $cos(ang) - bi[p] * $sin(ang);
        ci[k] += br[p] * $sin(ang) + bi[p] * $cos(ang);
      end
      if (!dit && k > 0) begin
        real tr;
        tr    = cr[k] * real'(w[k].re) / 16384.0 - ci[k] * real'(w[k].im) / 16384.0;
        ci[k] = cr[k] * real'(w[k].im) / 16384.0 + ci[k] * real'(w[k].re) / 16384.0;
        cr[k] = tr;
      end
      cr[k] /= real'(1 << shift); ci[k] /= real'(1 << shift);
      if (cr[k] > 32767.0) cr[k] = 32767.0;
      if (cr[k] < -32768.0) cr[k] = -32768.0;
      if (ci[k] > 32767.0) ci[k] = 32767.0;
      if (ci[k] < -32768.0) ci[k] = -32768.0;
      ex_lim[n_push][k] = 0;
      if (lim_en) begin
        real lo_r, hi_r, lo_i, hi_i;
        lo_r = r[k].re - real'(delta); hi_r = r[k].re + real'(delta);
        lo_i = r[k].im - real'(delta); hi_i = r[k].im + real'(delta);
        if (cr[k] < lo_r - 1.0) begin cr[k] = lo_r; ex_lim[n_push][k] = 1; end
        if (cr[k] > hi_r + 1.0) begin cr[k] = hi_r; ex_lim[n_push][k] = 1; end
        if (ci[k] < lo_i - 1.0) begin ci[k] = lo_i; ex_lim[n_push][k] = 1; end
        if (ci[k] > hi_i + 1.0) begin ci[k] = hi_i; ex_lim[n_push][k] = 1; end
      end
      ex_re[n_push][k] = cr[k]; ex_im[n_push][k] = ci[k];
    end
    ex_t[n_push] = cyc + BF_LATENCY;
    n_push++;
  endfunction

  // compare outputs
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (n_pop >= n_push) begin
      failures++;
      $display("unexpected output");
    end else begin
      if (ex_t[n_pop] != cyc) begin
        failures++;
        $display("latency: expected at %0d, came at %0d", ex_t[n_pop], cyc);
      end
      for (int k = 0; k < 4; k++) begin
        real dr, di;
        dr = real'(y[k].re) - ex_re[n_pop][k];
        di = real'(y[k].im) - ex_im[n_pop][k];
        checks++;
        if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
          failures++;
          if (failures < 10) $display("lane %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                                      k, y[k].re, y[k].im, ex_re[n_pop][k], ex_im[n_pop][k]);
        end
        if (ex_lim[n_pop][k]) begin
          n_clamped++;
          checks++;
          if (!limited[k]) begin failures++; $display("lane %0d: limited flag missing", k); end
        end
      end
      n_pop++;
    end
  end

  initial begin
    dit = 0; inverse = 0; lim_en = 0; shift = 0; delta = '0;
    a = '{default: '0}; r = '{default: '0}; w = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      dit      = 1'($urandom);
      inverse  = 1'($urandom);
      shift    = 2'($urandom_range(0, 2));
      lim_en   = 1'($urandom);
      delta    = (DW-1)'($urandom_range(0, 3000));
      for (int p = 0; p < 4; p++) begin
        a[p].re = DW'($urandom_range(0, 16000)) - 16'sd8000;
        a[p].im = DW'($urandom_range(0, 16000)) - 16'sd8000;
        r[p].re = DW'($urandom_range(0, 8000)) - 16'sd4000;
        r[p].im = DW'($urandom_range(0, 8000)) - 16'sd4000;
      end
      for (int p = 1; p < 4; p++) begin
        real ang;
        ang = 2.0 * PI * $urandom_range(0, 255) / 256.0;
        w[p].re = TW'($rtoi($cos(ang) * 16384.0));
        w[p].im = TW'($rtoi($sin(ang) * 16384.0));
      end
      if (in_valid) model();
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_pop != n_push) begin failures++; $display("%0d results missing", n_push - n_pop); end
    checks++;
    if (n_clamped == 0) begin failures++; $display("limiter never clamped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
