// tb_power_limiter: runs the power limiter on a memory model filled with
// random noise-like samples plus planted peaks. An integer/float model
// computes the limit (mean power * par_factor / 256, truncated), the number
// of samples to scale (those above the limit, at most MAX_PEAKS, largest
// first) and their scaled values. Checks: the limit, the scaled count, that
// every scaled sample is within 3 LSB of a_lim * x / |x| and at or below the
// limit, and that every other sample is untouched. One case uses a low limit
// so that the MAX_PEAKS bound is reached.
module tb_power_limiter;
  import par_pkg::*;
  localparam int MAXP = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, wr_en, busy, done;
  logic [15:0] par_factor;
  logic [7:0] rd_addr [4], wr_addr, n_scaled;
  cplx_t rd_data [4], wr_data;
  logic [31:0] p_limit;
  cplx_t mem [256], orig [256];

  power_limiter #(.N(256), .MAX_PEAKS(MAXP)) dut (.*);
  always_comb for (int p = 0; p < 4; p++) rd_data[p] = mem[rd_addr[p]];
  always @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  int checks = 0, failures = 0, capped = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    par_factor = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      longint sum, mean, lim, pw [256];
      int alim, nexp;
      bit sel [256];
      par_factor = (t == 5) ? 16'h0100 : 16'h0400;   // 0 dB or 6 dB above mean
      for (int n = 0; n < 256; n++) begin
        int a, b;
        a = 0; b = 0;
        for (int i = 0; i < 4; i++) begin
          a += int'($urandom_range(0, 1600)) - 800;
          b += int'($urandom_range(0, 1600)) - 800;
        end
        mem[n].re = DW'(a); mem[n].im = DW'(b);
      end
      for (int i = 0; i < t; i++) mem[$urandom_range(0, 255)] = '{re: 16'sd6000, im: -16'sd5000};
      orig = mem;
      sum = 0;
      for (int n = 0; n < 256; n++) begin
        pw[n] = longint'(mem[n].re) * mem[n].re + longint'(mem[n].im) * mem[n].im;
        sum += pw[n];
        sel[n] = 0;
      end
      mean = sum / 256;
      lim  = (mean * par_factor) / 256;
      alim = $rtoi($floor($sqrt(real'(lim))));
      while (alim * alim > lim) alim--;
      nexp = 0;
      while (nexp < MAXP) begin
        int best;
        longint bp;
        best = 0; bp = -1;
        for (int n = 0; n < 256; n++) if (!sel[n] && pw[n] > bp) begin bp = pw[n]; best = n; end
        if (bp <= lim) break;
        sel[best] = 1;
        nexp++;
      end

      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);

      checks += 2;
      if (longint'(p_limit) != lim) begin failures++; $display("limit %0d vs %0d", p_limit, lim); end
      if (int'(n_scaled) != nexp)   begin failures++; $display("scaled %0d vs %0d", n_scaled, nexp); end
      if (nexp == MAXP) capped++;
      for (int n = 0; n < 256; n++) begin
        checks++;
        if (sel[n]) begin
          real er, ei, m;
          longint p2;
          m  = $sqrt(real'(pw[n]));
          er = real'(orig[n].re) * alim / m;
          ei = real'(orig[n].im) * alim / m;
          p2 = longint'(mem[n].re) * mem[n].re + longint'(mem[n].im) * mem[n].im;
          if (p2 > lim || real'(mem[n].re) - er > 3.0 || er - real'(mem[n].re) > 3.0 ||
              real'(mem[n].im) - ei > 3.0 || ei - real'(mem[n].im) > 3.0) begin
            failures++;
            if (failures < 10) $display("sample %0d scaled wrongly", n);
          end
        end else if (mem[n] != orig[n]) begin
          failures++;
          if (failures < 10) $display("sample %0d changed", n);
        end
      end
      $display("case %0d: limit=%0d scaled=%0d", t, p_limit, n_scaled);
    end
    checks++;
    if (capped == 0) begin failures++; $display("MAX_PEAKS bound never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
