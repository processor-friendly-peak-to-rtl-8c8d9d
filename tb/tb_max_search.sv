// tb_max_search: fills a memory model with random samples (and planted
// peaks, including ties and a full-scale -32768 sample), runs the search and
// checks the address, value and power of the largest sample, the power sum,
// and that done comes N/4 + 1 cycles after start.
module tb_max_search;
  import par_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [7:0] rd_addr [4], max_addr;
  cplx_t rd_data [4], max_val;
  logic [31:0] max_pow;
  logic [39:0] pow_sum;
  cplx_t mem [256];

  max_search dut (.*);
  always_comb for (int p = 0; p < 4; p++) rd_data[p] = mem[rd_addr[p]];

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      longint sum, bp, p;
      int ba, nc, amp;
      amp = (t < 10) ? 2000 : 30000;
      for (int n = 0; n < 256; n++) begin
        mem[n].re = DW'(int'($urandom_range(0, 2 * amp)) - amp);
        mem[n].im = DW'(int'($urandom_range(0, 2 * amp)) - amp);
      end
      if (t == 3) begin mem[77] = '{re: 16'sd9000, im: 16'sd0}; mem[200] = '{re: 16'sd0, im: -16'sd9000}; end
      if (t == 4) mem[255] = '{re: 16'sh8000, im: 16'sh8000};
      sum = 0; bp = -1; ba = 0;
      for (int n = 0; n < 256; n++) begin
        p = longint'(mem[n].re) * mem[n].re + longint'(mem[n].im) * mem[n].im;
        sum += p;
        if (p > bp) begin bp = p; ba = n; end
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      nc = 1;
      while (!done) begin @(negedge clk); nc++; end
      checks += 4;
      if (int'(max_addr) != ba)           begin failures++; $display("addr %0d vs %0d", max_addr, ba); end
      if (longint'(max_pow) != bp)        begin failures++; $display("pow %0d vs %0d", max_pow, bp); end
      if (max_val != mem[ba])             begin failures++; $display("value mismatch"); end
      if (longint'(pow_sum) != sum)       begin failures++; $display("sum %0d vs %0d", pow_sum, sum); end
      checks++;
      if (nc != 65) begin failures++; $display("took %0d cycles", nc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
