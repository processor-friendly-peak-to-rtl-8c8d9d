// sample_memory: complex sample memory feeding one radix-4 butterfly per
// cycle.
//
// DEPTH words of cplx_t, four asynchronous read ports and four synchronous
// write ports, so all four operands of a butterfly are read and all four
// results written back every cycle. Keeping the memory wide enough is what
// lets the limiter run transparently behind the FFT. Write ports must not
// target the same address in one cycle (the FFT address pattern guarantees
// it); if they do, the highest port wins. The contents are not reset.
// Written as a flip-flop array; the port count is this design's choice.
module sample_memory
  import par_pkg::*;
#(
  parameter int DEPTH = NFFT
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr [4],
  output cplx_t                    rd_data [4],
  input  logic [3:0]               wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr [4],
  input  cplx_t                    wr_data [4]
);
  cplx_t mem [DEPTH];

  always_comb begin
    for (int p = 0; p < 4; p++) rd_data[p] = mem[rd_addr[p]];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++)
      if (wr_en[p]) mem[wr_addr[p]] <= wr_data[p];
  end
endmodule
