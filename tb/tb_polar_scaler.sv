// tb_polar_scaler: scales random samples (all four quadrants, full scale
// included) to random magnitude limits below their own magnitude. Checks
// that the result's power does not exceed a_lim^2, that it is within 3 LSB
// of the exact a_lim * x / |x| (so the phase is kept), and that done comes
// 35 cycles after start.
module tb_polar_scaler;
  import par_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  cplx_t x, y;
  logic [31:0] pow;
  logic [15:0] a_lim;

  polar_scaler dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; pow = '0; a_lim = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      real mag, er, ei;
      longint p2;
      int nc;
      if (t == 0) begin x.re = 16'sh8000; x.im = 16'sh8000; end
      else begin
        x.re = DW'(int'($urandom_range(0, 60000)) - 30000);
        x.im = DW'(int'($urandom_range(0, 60000)) - 30000);
      end
      pow = 32'(longint'(x.re) * x.re + longint'(x.im) * x.im);
      mag = $sqrt(real'(pow));
      a_lim = 16'($urandom_range(0, $rtoi(mag)));
      er = real'(x.re) * a_lim / mag;
      ei = real'(x.im) * a_lim / mag;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      nc = 1;
      while (!done) begin @(negedge clk); nc++; end
      p2 = longint'(y.re) * y.re + longint'(y.im) * y.im;
      checks += 3;
      if (p2 > longint'(a_lim) * a_lim) begin
        failures++; $display("power %0d above limit %0d", p2, longint'(a_lim) * a_lim);
      end
      if (real'(y.re) - er > 3.0 || er - real'(y.re) > 3.0 ||
          real'(y.im) - ei > 3.0 || ei - real'(y.im) > 3.0) begin
        failures++;
        if (failures < 10) $display("x=(%0d,%0d) lim=%0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                                    x.re, x.im, a_lim, y.re, y.im, er, ei);
      end
      if (nc != 35) begin failures++; $display("took %0d cycles", nc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
