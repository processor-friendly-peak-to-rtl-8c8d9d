// tb_real_limiter: checks the real limiter against the clamp rule on
// directed edge cases (window edges, full-scale references that would wrap)
// and on random values. Combinational block: each vector settles for 1 ns.
module tb_real_limiter;
  logic signed [15:0] x, r, y;
  logic        [14:0] d;
  logic               lim;
  int checks = 0, failures = 0;

  real_limiter #(.W(16)) dut (.x(x), .ref_x(r), .delta(d), .y(y), .limited(lim));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int xi, input int ri, input int di);
    int lo, hi, e;
    bit el;
    x = 16'(xi); r = 16'(ri); d = 15'(di);
    #1;
    lo = ri - di; hi = ri + di;
    if (lo < -32768) lo = -32768;
    if (hi > 32767)  hi = 32767;
    e = xi; el = 0;
    if (xi < lo) begin e = lo; el = 1; end
    if (xi > hi) begin e = hi; el = 1; end
    checks++;
    if (int'(y) != e || lim != el) begin
      failures++;
      $display("x=%0d ref=%0d d=%0d: got %0d/%0b expected %0d/%0b", xi, ri, di, y, lim, e, el);
    end
  endtask

  initial begin
    check(100, 100, 10);  check(111, 100, 10);  check(110, 100, 10);
    check(89, 100, 10);   check(90, 100, 10);   check(-500, 0, 0);
    check(32767, 32760, 100);   check(-32768, -32760, 100);
    check(-32768, 32767, 32767); check(32767, -32768, 32767);
    for (int i = 0; i < 2000; i++)
      check(int'($signed(16'($urandom))), int'($signed(16'($urandom))), int'($urandom_range(0, 4000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
