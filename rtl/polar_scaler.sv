// polar_scaler: polar scaling of one complex sample down to a magnitude limit.
//
// Both I and Q are multiplied by the same real factor s = a_lim / |x|, so the
// phase of the sample is kept and only its magnitude changes. |x| comes from
// an isqrt of the power I^2 + Q^2 supplied by the max search, rounded up
// when the power is not a perfect square; s is formed
// as a Q1.15 fraction by a bit-serial divider; the products are truncated
// toward zero so the scaled sample never exceeds the limit. Used only on a
// sample whose power exceeds a_lim^2, so s <= 1.
// Timing: start -> isqrt (17 cycles) -> divide (16 cycles) -> multiply
// (1 cycle); `done` pulses with y valid 35 cycles after the start cycle.
// Scaling by one real factor follows the algorithm; how the factor is
// computed is this design's choice.
module polar_scaler
  import par_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cplx_t       x,
  input  logic [31:0] pow,
  input  logic [15:0] a_lim,
  output logic        busy,
  output logic        done,
  output cplx_t       y
);
  typedef enum logic [1:0] {P_IDLE, P_SQRT, P_DIV, P_MUL} pstate_e;

  pstate_e     st;
  cplx_t       xr;
  logic [15:0] alr;
  logic        sq_start, sq_done;
  logic [15:0] mag, magc;
  logic [31:0] powr;
  logic [15:0] q;
  logic [3:0]  qbit;
  logic [15:0] q_trial;
  logic [31:0] num, prod;

  isqrt #(.WIDTH(32)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .start(sq_start), .x(pow),
    .busy(), .done(sq_done), .root(mag)
  );

  assign sq_start = start && (st == P_IDLE);
  assign num      = {1'b0, alr, 15'd0};
  assign q_trial  = q | (16'd1 << qbit);
  assign prod     = 32'(q_trial) * 32'(magc);

  function automatic logic signed [DW-1:0] scale(input logic signed [DW-1:0] v, input logic [15:0] f);
    logic [DW-1:0] mv;
    logic [31:0]   pm;
    mv = v[DW-1] ? DW'(-v) : v;
    if (v == {1'b1, {(DW-1){1'b0}}}) mv = {1'b1, {(DW-1){1'b0}}};
    pm = 32'(mv) * 32'(f);
    pm = pm >> 15;
    return v[DW-1] ? -DW'(pm) : DW'(pm);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= P_IDLE;
      xr   <= '0;
      alr  <= '0;
      powr <= '0;
      magc <= '0;
      q    <= '0;
      qbit <= '0;
      done <= 1'b0;
      y    <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        P_IDLE: if (start) begin
          xr   <= x;
          alr  <= a_lim;
          powr <= pow;
          st  <= P_SQRT;
        end
        P_SQRT: if (sq_done) begin
          // ceil(sqrt(pow)) keeps the scaled magnitude at or below a_lim
          magc <= (32'(mag) * 32'(mag) == powr) ? mag : mag + 16'd1;
          q    <= '0;
          qbit <= 4'd15;
          st   <= P_DIV;
        end
        P_DIV: begin
          if (prod <= num) q <= q_trial;
          if (qbit == 4'd0) st <= P_MUL;
          else              qbit <= qbit - 4'd1;
        end
        P_MUL: begin
          y.re <= scale(xr.re, q);
          y.im <= scale(xr.im, q);
          done <= 1'b1;
          st   <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assign busy = (st != P_IDLE);
endmodule
