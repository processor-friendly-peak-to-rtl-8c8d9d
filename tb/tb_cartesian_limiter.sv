// tb_cartesian_limiter: checks that I and Q are clamped independently to
// within delta of the reference point, and the per-axis limited flags.
module tb_cartesian_limiter;
  import par_pkg::*;
  cplx_t x, r, y;
  logic [DW-2:0] d;
  logic lre, lim_q;
  int checks = 0, failures = 0;

  cartesian_limiter dut (.x(x), .ref_pt(r), .delta(d), .y(y), .limited_re(lre), .limited_im(lim_q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampv(input int v, input int c, input int dd);
    if (v > c + dd) return c + dd;
    if (v < c - dd) return c - dd;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int er, ei;
      x.re = DW'($urandom_range(0, 8000)) - 16'sd4000;
      x.im = DW'($urandom_range(0, 8000)) - 16'sd4000;
      r.re = DW'($urandom_range(0, 4000)) - 16'sd2000;
      r.im = DW'($urandom_range(0, 4000)) - 16'sd2000;
      d    = (DW-1)'($urandom_range(0, 1500));
      #1;
      er = clampv(int'(x.re), int'(r.re), int'(d));
      ei = clampv(int'(x.im), int'(r.im), int'(d));
      checks++;
      if (int'(y.re) != er || int'(y.im) != ei ||
          lre != (er != int'(x.re)) || lim_q != (ei != int'(x.im))) begin
        failures++;
        if (failures < 10) $display("mismatch %0d %0d -> %0d %0d", x.re, x.im, y.re, y.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
