// max_search: vector maximum search over the sample memory.
//
// After `start` it reads four samples per cycle (addresses 4c..4c+3, one
// cycle per group, N/4 cycles in all), computes their powers I^2 + Q^2,
// and keeps the largest one seen, its address and the sample itself. Ties
// keep the lowest address. It also sums all powers, from which the power
// limiter derives the mean power. `done` pulses one cycle after the last
// group; the results stay valid until the next start. Searching four lanes
// per cycle uses the four read ports that the FFT needs anyway; the lane
// count and widths are this design's choice.
module max_search
  import par_pkg::*;
#(
  parameter int N = NFFT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic [$clog2(N)-1:0]      rd_addr [4],
  input  cplx_t                     rd_data [4],
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(N)-1:0]      max_addr,
  output cplx_t                     max_val,
  output logic [31:0]               max_pow,
  output logic [31+$clog2(N):0]     pow_sum
);
  localparam int A = $clog2(N);

  logic [A-3:0] grp;
  logic [31:0]  pw [4];
  logic [1:0]   best_lane;
  logic [31:0]  best_pw;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rd_addr[p] = {grp, 2'(p)};
      pw[p] = 32'(rd_data[p].re * rd_data[p].re) + 32'(rd_data[p].im * rd_data[p].im);
    end
    best_lane = 2'd0;
    best_pw   = pw[0];
    for (int p = 1; p < 4; p++)
      if (pw[p] > best_pw) begin
        best_pw   = pw[p];
        best_lane = 2'(p);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      grp      <= '0;
      max_addr <= '0;
      max_val  <= '0;
      max_pow  <= '0;
      pow_sum  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        grp     <= '0;
        max_pow <= '0;
        max_addr <= '0;
        max_val <= '0;
        pow_sum <= '0;
      end else if (busy) begin
        pow_sum <= pow_sum + (32+A)'(pw[0]) + (32+A)'(pw[1]) + (32+A)'(pw[2]) + (32+A)'(pw[3]);
        if (grp == '0 || best_pw > max_pow) begin
          max_pow  <= best_pw;
          max_addr <= {grp, best_lane};
          max_val  <= rd_data[best_lane];
        end
        if (grp == '1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        grp <= grp + 1'b1;
      end
    end
  end
endmodule
