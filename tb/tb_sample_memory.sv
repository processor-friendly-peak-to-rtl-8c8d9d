// tb_sample_memory: writes random words through all four write ports, then
// reads them back through all four read ports and compares with a shadow
// array; also checks that a disabled port does not write.
module tb_sample_memory;
  import par_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  addr_t ra [4], wa [4];
  cplx_t rd [4], wd [4];
  logic [3:0] we;
  cplx_t shadow [256];
  int checks = 0, failures = 0;

  sample_memory dut (.clk(clk), .rd_addr(ra), .rd_data(rd), .wr_en(we), .wr_addr(wa), .wr_data(wd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0;
    ra = '{default: '0}; wa = '{default: '0}; wd = '{default: '0};
    // fill: address 4c+p through port p
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        wa[p] = addr_t'(4*c + p);
        wd[p] = cplx_t'($urandom);
        shadow[4*c+p] = wd[p];
      end
      we = 4'hf;
    end
    // random partial writes to scattered addresses
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        wa[p] = addr_t'(64*p + $urandom_range(0, 63));
        wd[p] = cplx_t'($urandom);
      end
      we = 4'($urandom);
      for (int p = 0; p < 4; p++) if (we[p]) shadow[wa[p]] = wd[p];
    end
    @(negedge clk);
    we = '0;
    for (int c = 0; c < 256; c++) begin
      for (int p = 0; p < 4; p++) ra[p] = addr_t'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd[p] != shadow[ra[p]]) begin
          failures++;
          if (failures < 10) $display("addr %0d port %0d: %h vs %h", ra[p], p, rd[p], shadow[ra[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
