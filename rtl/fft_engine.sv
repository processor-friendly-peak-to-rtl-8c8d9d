// fft_engine: in-place radix-4 FFT sequencer around one r4_butterfly.
//
// It walks the sample memory stage by stage, issuing one butterfly per cycle
// and writing the results back to the addresses they were read from. Three
// transforms are provided, selected by `xform` when `start` is pulsed:
//
//   XF_IFFT256_UP  256-point inverse FFT, decimation in time. The input holds
//                  only 64 subcarriers (the rest is zero padding for 4x
//                  interpolation), so every first-stage butterfly has one
//                  non-zero input and its four outputs equal that input. The
//                  loader writes each subcarrier four times and the engine
//                  starts at stage 1, skipping the 64 first-stage butterflies.
//                  Input in base-4 digit-reversed order, output in natural order.
//   XF_FFT256_DOWN 256-point forward FFT, decimation in frequency, natural
//                  input order. Only bins 0..63 are kept (4x decimation). In
//                  the last stage butterfly m yields bin rev4_3(m) on its lane
//                  0, which is written to address m; lanes 1..3 are dropped.
//                  That stage also enables the butterfly's cartesian limiter,
//                  with the reference point of that bin fetched through
//                  ref_addr/ref_data, so the limit costs no extra pass.
//                  Addresses 0..63 then hold the 64 bins in digit-reversed
//                  order, which is the input order the next transform wants.
//   XF_IFFT64      64-point inverse FFT, decimation in time, on addresses 0..63.
//
// Per-stage right shifts keep the words in range: inverse transforms shift
// by 1 per computed stage, the forward 256-point transform by 2,2,1,0, so the
// chain IFFT256_UP -> FFT256_DOWN returns the subcarriers at their input
// scale and IFFT64 yields every fourth sample of the oversampled signal.
// Each stage takes N/4 issue cycles (N/4 - 0 for skipped butterflies) plus
// BF_LATENCY drain cycles. `done` pulses one cycle when the last write is
// complete; `n_limited` counts the bins the limiter changed during the run.
// The transform split and the zero-padding/decimation savings follow the
// algorithm; memory ports, shifts and the drain scheme are this design's.
module fft_engine
  import par_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  xform_e        xform,
  input  logic          lim_en,
  input  logic [DW-2:0] delta,
  output logic          busy,
  output logic          done,
  output logic [7:0]    n_limited,
  // reference constellation points, by natural subcarrier index
  output logic [5:0]    ref_addr,
  input  cplx_t         ref_data,
  // sample memory
  output addr_t         rd_addr [4],
  input  cplx_t         rd_data [4],
  output logic [3:0]    wr_en,
  output addr_t         wr_addr [4],
  output cplx_t         wr_data [4]
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e     state;
  xform_e     xf;
  logic [1:0] stage;
  logic [5:0] bcnt;
  logic [1:0] drain;

  logic       is_dif, is_64;
  logic [1:0] last_stage;
  logic [5:0] last_b;
  logic       dec_stage;

  assign is_dif     = (xf == XF_FFT256_DOWN);
  assign is_64      = (xf == XF_IFFT64);
  assign last_stage = is_64 ? 2'd2 : 2'd3;
  assign last_b     = is_64 ? 6'd15 : 6'd63;
  assign dec_stage  = is_dif && (stage == 2'd3);

  // ---------------- address and twiddle generation ------------------------
  logic [1:0] lgl;          // log4 of the butterfly span
  addr_t      span, jmask, base, jj;
  logic [5:0] jt;           // j times twiddle stride, < 64
  addr_t      idx [4];
  logic [7:0] texp [1:3];
  twid_t      tw [1:3];
  logic [1:0] shift;

  always_comb begin
    lgl   = is_dif ? (2'd3 - stage) : stage;
    span  = addr_t'(1) << (2 * lgl);
    jmask = span - addr_t'(1);
    jj    = addr_t'(bcnt) & jmask;
    base  = (addr_t'(bcnt) >> (2 * lgl)) << (2 * lgl + 2);
    for (int p = 0; p < 4; p++) idx[p] = base + jj + addr_t'(p) * span;
    // DIT stage s: W_256^(p*j*4^(3-s)); DIF stage s: W_256^(q*j*4^s)
    jt = is_dif ? 6'(jj << (2 * stage)) : 6'(jj << (2 * (2'd3 - stage)));
    for (int p = 1; p < 4; p++) begin
      logic [2*TW-1:0] e;
      texp[p] = 8'(p) * {2'b00, jt};
      e = TWIDDLE[texp[p]];
      tw[p].re = e[2*TW-1:TW];
      // inverse transforms use the conjugate twiddle
      tw[p].im = is_dif ? e[TW-1:0] : -e[TW-1:0];
    end
    case (xf)
      XF_FFT256_DOWN: shift = (stage <= 2'd1) ? 2'd2 : (stage == 2'd2) ? 2'd1 : 2'd0;
      default:        shift = 2'd1;
    endcase
  end

  assign rd_addr  = idx;
  assign ref_addr = rev4_3(bcnt);

  // ---------------- butterfly ---------------------------------------------
  logic  bf_in_valid, bf_out_valid;
  cplx_t bf_y [4];
  cplx_t bf_ref [4];
  logic [3:0] bf_limited;

  assign bf_in_valid = (state == S_RUN);
  assign bf_ref      = '{ref_data, ref_data, ref_data, ref_data};

  r4_butterfly u_bf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(bf_in_valid), .a(rd_data), .w(tw),
    .dit(!is_dif), .inverse(!is_dif), .shift(shift),
    .lim_en(lim_en && dec_stage), .ref_pt(bf_ref), .delta(delta),
    .out_valid(bf_out_valid), .y(bf_y), .limited(bf_limited)
  );

  // write-back addresses travel alongside the butterfly pipeline
  addr_t pipe_idx [BF_LATENCY][4];
  logic  pipe_dec [BF_LATENCY];
  logic [5:0] pipe_b [BF_LATENCY];

  always_ff @(posedge clk) begin
    pipe_idx[0] <= idx;
    pipe_dec[0] <= dec_stage;
    pipe_b[0]   <= bcnt;
    for (int k = 1; k < BF_LATENCY; k++) begin
      pipe_idx[k] <= pipe_idx[k-1];
      pipe_dec[k] <= pipe_dec[k-1];
      pipe_b[k]   <= pipe_b[k-1];
    end
  end

  always_comb begin
    wr_data = bf_y;
    if (pipe_dec[BF_LATENCY-1]) begin
      wr_en   = {3'b000, bf_out_valid};
      wr_addr = '{addr_t'(pipe_b[BF_LATENCY-1]), '0, '0, '0};
    end else begin
      wr_en   = {4{bf_out_valid}};
      wr_addr = pipe_idx[BF_LATENCY-1];
    end
  end

  // ---------------- sequencing --------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      xf        <= XF_IFFT256_UP;
      stage     <= '0;
      bcnt      <= '0;
      drain     <= '0;
      done      <= 1'b0;
      n_limited <= '0;
    end else begin
      done <= 1'b0;
      if (bf_out_valid && pipe_dec[BF_LATENCY-1] && bf_limited[0])
        n_limited <= n_limited + 8'd1;
      case (state)
        S_IDLE: if (start) begin
          xf        <= xform;
          stage     <= (xform == XF_IFFT256_UP) ? 2'd1 : 2'd0;
          bcnt      <= '0;
          n_limited <= '0;
          state     <= S_RUN;
        end
        S_RUN: begin
          if (bcnt == last_b) begin
            bcnt  <= '0;
            drain <= 2'(BF_LATENCY - 1);
            state <= S_DRAIN;
          end else begin
            bcnt <= bcnt + 6'd1;
          end
        end
        S_DRAIN: begin
          if (drain == 2'd0) begin
            if (stage == last_stage) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              stage <= stage + 2'd1;
              state <= S_RUN;
            end
          end else begin
            drain <= drain - 2'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
