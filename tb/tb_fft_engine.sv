// tb_fft_engine: runs the three transforms of the FFT engine on a memory
// model held in the testbench and compares the results with directly
// evaluated DFT sums (tolerance 8 LSB):
//   - XF_IFFT64 on 64 random bins in digit-reversed order,
//   - XF_IFFT256_UP on 64 bins expanded for the skipped first stage,
//   - XF_FFT256_DOWN on 256 random samples, without and with the limiter;
//     with it, every kept bin must lie within delta of its reference point
//     and n_limited must count the bins that had to be clamped.
// It also checks each transform's busy time: per computed stage N/4 issue
// cycles plus 3 drain cycles (IFFT64 57, IFFT256_UP 201, FFT256_DOWN 268).
module tb_fft_engine;
  import par_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, lim_en = 0, busy, done;
  xform_e xform;
  logic [DW-2:0] delta;
  logic [7:0] n_limited;
  logic [5:0] ref_addr;
  cplx_t ref_data;
  addr_t rd_addr [4], wr_addr [4];
  cplx_t rd_data [4], wr_data [4];
  logic [3:0] wr_en;

  fft_engine dut (.*);

  cplx_t mem [256];
  cplx_t refs [64];
  always_comb for (int p = 0; p < 4; p++) rd_data[p] = mem[rd_addr[p]];
  assign ref_data = refs[ref_addr];
  always @(posedge clk) for (int p = 0; p < 4; p++) if (wr_en[p]) mem[wr_addr[p]] <= wr_data[p];

  int checks = 0, failures = 0;
  real er [256], ei [256];
  real xr [256], xi [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev3(input int v);
    return ((v & 3) << 4) | (v & 12) | ((v >> 4) & 3);
  endfunction

  task automatic run(input xform_e xf, input int exp_cycles);
    int nb;
    @(negedge clk);
    xform = xf; start = 1;
    @(negedge clk);
    start = 0;
    nb = 1;
    while (!done) begin
      @(negedge clk);
      if (busy) nb++;
    end
    checks++;
    if (nb != exp_cycles) begin
      failures++;
      $display("xform %0d: busy %0d cycles, expected %0d", xf, nb, exp_cycles);
    end
  endtask

  task automatic compare(input int n, input string name);
    int maxe = 0;
    for (int a = 0; a < n; a++) begin
      real dr, di;
      dr = real'(mem[a].re) - er[a];
      di = real'(mem[a].im) - ei[a];
      checks++;
      if (dr > 8.0 || dr < -8.0 || di > 8.0 || di < -8.0) begin
        failures++;
        if (failures < 10) $display("%s addr %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                                    name, a, mem[a].re, mem[a].im, er[a], ei[a]);
      end
    end
    $display("%s compared", name);
  endtask

  initial begin
    int clamped;
    delta = '0; xform = XF_IFFT64;
    refs = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 64-point inverse FFT ----
    for (int k = 0; k < 64; k++) begin
      xr[k] = real'($urandom_range(0, 4000)) - 2000.0;
      xi[k] = real'($urandom_range(0, 4000)) - 2000.0;
      mem[rev3(k)].re = DW'($rtoi(xr[k]));
      mem[rev3(k)].im = DW'($rtoi(xi[k]));
    end
    for (int n = 0; n < 64; n++) begin
      er[n] = 0.0; ei[n] = 0.0;
      for (int k = 0; k < 64; k++) begin
        real ang;
        ang = 2.0 * PI * k * n / 64.0;
        er[n] += xr[k] * $cos(ang) - xi[k] * $sin(ang);
        ei[n] += xr[k] * $sin(ang) + xi[k] * $cos(ang);
      end
      er[n] /= 8.0; ei[n] /= 8.0;
    end
    run(XF_IFFT64, 57);
    compare(64, "IFFT64");

    // ---- 256-point zero-padded inverse FFT ----
    for (int k = 0; k < 64; k++) begin
      xr[k] = real'($urandom_range(0, 3000)) - 1500.0;
      xi[k] = real'($urandom_range(0, 3000)) - 1500.0;
      for (int i = 0; i < 4; i++) begin
        mem[4 * rev3(k) + i].re = DW'($rtoi(xr[k]));
        mem[4 * rev3(k) + i].im = DW'($rtoi(xi[k]));
      end
    end
    for (int n = 0; n < 256; n++) begin
      er[n] = 0.0; ei[n] = 0.0;
      for (int k = 0; k < 64; k++) begin
        real ang;
        ang = 2.0 * PI * k * n / 256.0;
        er[n] += xr[k] * $cos(ang) - xi[k] * $sin(ang);
        ei[n] += xr[k] * $sin(ang) + xi[k] * $cos(ang);
      end
      er[n] /= 8.0; ei[n] /= 8.0;
    end
    run(XF_IFFT256_UP, 201);
    compare(256, "IFFT256_UP");

    // ---- 256-point decimating forward FFT, limiter off then on ----
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < 256; n++) begin
        xr[n] = real'($urandom_range(0, 6000)) - 3000.0;
        xi[n] = real'($urandom_range(0, 6000)) - 3000.0;
        mem[n].re = DW'($rtoi(xr[n]));
        mem[n].im = DW'($rtoi(xi[n]));
      end
      clamped = 0;
      for (int m = 0; m < 64; m++) begin
        int k;
        real yr, yi;
        k = rev3(m);
        yr = 0.0; yi = 0.0;
        for (int n = 0; n < 256; n++) begin
          real ang;
          ang = -2.0 * PI * k * n / 256.0;
          yr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
          yi += xr[n] * $sin(ang) + xi[n] * $cos(ang);
        end
        yr /= 32.0; yi /= 32.0;
        if (pass == 1) begin
          // reference points scattered around the true bins; window 100 LSB
          refs[k].re = DW'($rtoi(yr) + int'($urandom_range(0, 400)) - 200);
          refs[k].im = DW'($rtoi(yi) + int'($urandom_range(0, 400)) - 200);
          if (yr > real'(refs[k].re) + 100.0) begin yr = real'(refs[k].re) + 100.0; clamped++; end
          else if (yr < real'(refs[k].re) - 100.0) begin yr = real'(refs[k].re) - 100.0; clamped++; end
          else if (yi > real'(refs[k].im) + 100.0) clamped++;
          else if (yi < real'(refs[k].im) - 100.0) clamped++;
          if (yi > real'(refs[k].im) + 100.0) yi = real'(refs[k].im) + 100.0;
          if (yi < real'(refs[k].im) - 100.0) yi = real'(refs[k].im) - 100.0;
        end
        er[m] = yr; ei[m] = yi;
      end
      lim_en = (pass == 1);
      delta  = 15'd100;
      run(XF_FFT256_DOWN, 268);
      compare(64, pass == 0 ? "FFT256_DOWN" : "FFT256_DOWN limited");
      checks++;
      // bins within rounding of the window edge may go either way
      if (int'(n_limited) < clamped - 4 || int'(n_limited) > clamped + 4 ||
          (pass == 1 && n_limited == 0) || (pass == 0 && n_limited != 0)) begin
        failures++;
        $display("pass %0d: n_limited=%0d, model %0d", pass, n_limited, clamped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
