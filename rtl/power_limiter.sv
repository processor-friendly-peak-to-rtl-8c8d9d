// power_limiter: complex power limit (soft limiter) on the oversampled
// time-domain symbol held in the sample memory.
//
// The limit is set relative to the symbol's own mean power: the first
// vector maximum search also sums all powers, the mean is that sum / N, and
// the power limit is L = mean * par_factor, par_factor being the allowed
// peak-to-average ratio as an unsigned Q8.8 number (6 dB -> 0x03FC).
// The amplitude limit a_lim = floor(sqrt(L)) is then formed once. After that
// the unit iterates: while the largest sample's power exceeds L, that sample
// is polar-scaled down to a_lim (phase kept) and written back, and the
// search is repeated. It stops when no sample exceeds L or after MAX_PEAKS
// scalings. Each iteration costs N/4 + 1 search cycles and about 37 scaling
// cycles.
// Memory: four read ports for the search, write port 0 for the write-back.
// Iterated maximum search plus polar scaling follows the algorithm; the
// relative threshold, its format and the MAX_PEAKS bound are this design's.
module power_limiter
  import par_pkg::*;
#(
  parameter int N         = NFFT,
  parameter int MAX_PEAKS = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [15:0]          par_factor,
  output logic [$clog2(N)-1:0] rd_addr [4],
  input  cplx_t                rd_data [4],
  output logic                 wr_en,
  output logic [$clog2(N)-1:0] wr_addr,
  output cplx_t                wr_data,
  output logic                 busy,
  output logic                 done,
  output logic [7:0]           n_scaled,
  output logic [31:0]          p_limit
);
  localparam int A = $clog2(N);

  typedef enum logic [2:0] {L_IDLE, L_SEARCH, L_THRESH, L_SQRT, L_CHECK, L_SCALE} lstate_e;

  lstate_e st;
  logic    first;

  logic             ms_start, ms_done;
  logic [A-1:0]     max_addr;
  cplx_t            max_val;
  logic [31:0]      max_pow;
  logic [31+A:0]    pow_sum;

  max_search #(.N(N)) u_search (
    .clk(clk), .rst_n(rst_n), .start(ms_start),
    .rd_addr(rd_addr), .rd_data(rd_data),
    .busy(), .done(ms_done),
    .max_addr(max_addr), .max_val(max_val), .max_pow(max_pow), .pow_sum(pow_sum)
  );

  logic        sq_start, sq_done;
  logic [15:0] a_lim;

  isqrt #(.WIDTH(32)) u_alim (
    .clk(clk), .rst_n(rst_n), .start(sq_start), .x(p_limit),
    .busy(), .done(sq_done), .root(a_lim)
  );

  logic  ps_start, ps_done;
  cplx_t ps_y;

  polar_scaler u_scale (
    .clk(clk), .rst_n(rst_n), .start(ps_start),
    .x(max_val), .pow(max_pow), .a_lim(a_lim),
    .busy(), .done(ps_done), .y(ps_y)
  );

  logic [31+A+16:0] lim_wide;
  assign lim_wide = ((32+A+16)'(pow_sum >> A) * (32+A+16)'(par_factor)) >> 8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= L_IDLE;
      first    <= 1'b0;
      ms_start <= 1'b0;
      sq_start <= 1'b0;
      ps_start <= 1'b0;
      n_scaled <= '0;
      p_limit  <= '0;
      done     <= 1'b0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      ms_start <= 1'b0;
      sq_start <= 1'b0;
      ps_start <= 1'b0;
      done     <= 1'b0;
      wr_en    <= 1'b0;
      case (st)
        L_IDLE: if (start) begin
          n_scaled <= '0;
          first    <= 1'b1;
          ms_start <= 1'b1;
          st       <= L_SEARCH;
        end
        L_SEARCH: if (ms_done) st <= first ? L_THRESH : L_CHECK;
        L_THRESH: begin
          p_limit  <= (lim_wide > (32+A+16)'(32'hffff_ffff)) ? 32'hffff_ffff : lim_wide[31:0];
          sq_start <= 1'b1;
          first    <= 1'b0;
          st       <= L_SQRT;
        end
        L_SQRT: if (sq_done) st <= L_CHECK;
        L_CHECK: begin
          if (max_pow > p_limit && 32'(n_scaled) < MAX_PEAKS) begin
            ps_start <= 1'b1;
            st       <= L_SCALE;
          end else begin
            done <= 1'b1;
            st   <= L_IDLE;
          end
        end
        L_SCALE: if (ps_done) begin
          wr_en    <= 1'b1;
          wr_addr  <= max_addr;
          wr_data  <= ps_y;
          n_scaled <= n_scaled + 8'd1;
          ms_start <= 1'b1;
          st       <= L_SEARCH;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  assign busy = (st != L_IDLE);

endmodule
