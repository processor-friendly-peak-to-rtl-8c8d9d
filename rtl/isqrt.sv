// isqrt: sequential integer square root, root = floor(sqrt(x)).
//
// Bit-serial: one result bit per cycle, most significant first, keeping a
// trial bit when the square of the trial root does not exceed x. `start`
// samples x; `done` pulses with the result WIDTH/2 + 1 cycles later. Used by
// the polar scaler for the magnitude of a sample and by the power limiter for
// the amplitude limit. The method is this design's choice.
module isqrt #(
  parameter int WIDTH = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [WIDTH-1:0]   x,
  output logic               busy,
  output logic               done,
  output logic [WIDTH/2-1:0] root
);
  localparam int RW = WIDTH / 2;

  logic [WIDTH-1:0]     xr;
  logic [$clog2(RW):0]  bitn;
  logic [RW-1:0]        trial;
  logic [WIDTH-1:0]     trial_sq;

  assign trial    = root | (RW'(1) << bitn[$clog2(RW)-1:0]);
  assign trial_sq = WIDTH'(trial) * WIDTH'(trial);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      xr   <= '0;
      bitn <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        xr   <= x;
        root <= '0;
        bitn <= ($clog2(RW)+1)'(RW - 1);
      end else if (busy) begin
        if (trial_sq <= xr) root <= trial;
        if (bitn == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bitn <= bitn - 1'b1;
        end
      end
    end
  end
endmodule
