// tb_par_workloads: the evaluation settings of the cartesian soft limiter,
// run on the default-size reducer.
//
// Random 64-QAM OFDM symbols (52 used bins, 256 LSB per level step, largest
// coordinate 1792) are processed at peak limits of 12, 9, 6 and 3 dB above
// the mean power with a cartesian window of 0.15 of the largest coordinate
// (269 LSB). For every symbol the testbench recovers the bins from the 64
// output samples with a floating-point DFT and measures
//   - SNR: power of the ideal constellation / power of its deviation,
//   - PAR: peak / mean power of the 4x oversampled signal rebuilt from
//     those bins, before and after processing.
// It prints one row per limit and checks that the window holds (no bin off
// by more than delta + 8 LSB), that a tighter limit never raises the SNR
// by more than the 1.5 dB spread of the fixed-point noise floor,
// that the 3 dB and 6 dB limits lower the average PAR, and that every
// symbol leaves within its cycle budget.
module tb_par_workloads;
  import par_pkg::*;

  localparam int STEP  = 256;
  localparam int DELTA = 269;
  localparam int NSYM  = 6;

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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t got [64];
  int    n_out;
  always @(posedge clk) if (out_valid) begin
    if (n_out < 64) got[n_out] <= out_data;
    n_out <= n_out + 1;
  end

  real xr [64], xi [64];

  function automatic real par_of(input real br [64], input real bi [64]);
    real pk, mean;
    pk = 0.0; mean = 0.0;
    for (int n = 0; n < 256; n++) begin
      real sr, si, p;
      sr = 0.0; si = 0.0;
      for (int k = 0; k < 64; k++) begin
        real a;
        a = 2.0 * PI * k * n / 256.0;
        sr += br[k] * $cos(a) - bi[k] * $sin(a);
        si += br[k] * $sin(a) + bi[k] * $cos(a);
      end
      p = sr * sr + si * si;
      mean += p / 256.0;
      if (p > pk) pk = p;
    end
    return 10.0 * $log10(pk / mean);
  endfunction

  task automatic run(input logic [15:0] f, output real snr_db, output real par_in, output real par_out,
                     output int cyc, output int worst);
    real yr [64], yi [64], sp, ep;
    int accepted;
    for (int k = 0; k < 64; k++) begin
      if (k == 32 || k < 6 || k > 58) begin xr[k] = 0.0; xi[k] = 0.0; end
      else begin
        xr[k] = real'((2 * int'($urandom_range(0, 7)) - 7) * STEP / 2);
        xi[k] = real'((2 * int'($urandom_range(0, 7)) - 7) * STEP / 2);
      end
    end
    n_out = 0;
    @(negedge clk);
    par_factor = f; delta = (DW-1)'(DELTA);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    accepted = 0;
    while (accepted < 64) begin
      in_valid = 1'b1;
      in_data.re = DW'($rtoi(xr[accepted]));
      in_data.im = DW'($rtoi(xi[accepted]));
      @(posedge clk);
      if (in_ready) accepted++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!done) @(posedge clk);
    @(negedge clk);
    cyc = int'(cycles);
    // bins back from the output: out = (1/8) IDFT64, so X = (8/64) DFT64
    sp = 0.0; ep = 0.0; worst = 0;
    for (int k = 0; k < 64; k++) begin
      yr[k] = 0.0; yi[k] = 0.0;
      for (int n = 0; n < 64; n++) begin
        real a;
        a = -2.0 * PI * k * n / 64.0;
        yr[k] += real'(got[n].re) * $cos(a) - real'(got[n].im) * $sin(a);
        yi[k] += real'(got[n].re) * $sin(a) + real'(got[n].im) * $cos(a);
      end
      yr[k] /= 8.0; yi[k] /= 8.0;
      sp += xr[k] * xr[k] + xi[k] * xi[k];
      ep += (yr[k] - xr[k]) ** 2 + (yi[k] - xi[k]) ** 2;
      if ($rtoi($sqrt((yr[k] - xr[k]) ** 2)) > worst) worst = $rtoi($sqrt((yr[k] - xr[k]) ** 2));
      if ($rtoi($sqrt((yi[k] - xi[k]) ** 2)) > worst) worst = $rtoi($sqrt((yi[k] - xi[k]) ** 2));
    end
    snr_db  = 10.0 * $log10(sp / (ep + 1.0e-9));
    par_in  = par_of(xr, xi);
    par_out = par_of(yr, yi);
  endtask

  initial begin
    logic [15:0] fac [4];
    real         lim_db [4];
    real         snr_avg [4];
    fac    = '{16'h0fda, 16'h07f1, 16'h03fc, 16'h0200};
    lim_db = '{12.0, 9.0, 6.0, 3.0};
    par_factor = '0; delta = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    $display("limit    SNR(dB)  PAR in(dB)  PAR out(dB)  avg cycles");
    for (int l = 0; l < 4; l++) begin
      real s_snr, s_pi, s_po;
      int  s_cyc;
      s_snr = 0.0; s_pi = 0.0; s_po = 0.0; s_cyc = 0;
      for (int s = 0; s < NSYM; s++) begin
        real snr, pi_db, po_db;
        int cyc, worst;
        run(fac[l], snr, pi_db, po_db, cyc, worst);
        s_snr += snr; s_pi += pi_db; s_po += po_db; s_cyc += cyc;
        checks += 2;
        if (worst > DELTA + 8) begin
          failures++;
          $display("limit %0.0f dB: a bin is %0d LSB off its point", lim_db[l], worst);
        end
        if (cyc > 4200) begin
          failures++;
          $display("limit %0.0f dB: %0d cycles", lim_db[l], cyc);
        end
      end
      snr_avg[l] = s_snr / NSYM;
      $display("%2.0f dB    %6.1f   %8.2f    %8.2f     %0d", lim_db[l], snr_avg[l],
               s_pi / NSYM, s_po / NSYM, s_cyc / NSYM);
      checks++;
      if (l >= 2 && s_po >= s_pi) begin
        failures++;
        $display("limit %0.0f dB did not lower the average PAR", lim_db[l]);
      end
    end
    for (int l = 1; l < 4; l++) begin
      checks++;
      if (snr_avg[l] > snr_avg[l-1] + 1.5) begin
        failures++;
        $display("SNR rose from %0.1f to %0.1f dB with a tighter limit", snr_avg[l-1], snr_avg[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
