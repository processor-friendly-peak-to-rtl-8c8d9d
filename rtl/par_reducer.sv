// par_reducer: peak-to-average reduction of one OFDM symbol by soft clipping
// with a cartesian limiter.
//
// Flow for one symbol of NSUB = 64 subcarriers:
//   1. LOAD     64 constellation points X_k arrive on in_data (k = 0..63,
//               one per accepted in_valid). Each is stored as the reference
//               point of bin k and written, already expanded for the skipped
//               first IFFT stage, to the sample memory.
//   2. IFFT     4x oversampled 256-point inverse FFT (zero-padded, DIT).
//   3. PLIM     power limit: iterated maximum search and polar scaling of
//               every sample whose power exceeds par_factor x mean power.
//   4. FFT      256-point forward FFT (DIF) back to 64 bins (decimation);
//               its last stage clamps each bin to within delta of its
//               reference point, in both I and Q (cartesian limiter).
//   5. IFFT64   64-point inverse FFT of the corrected bins.
//   6. OUT      64 time-domain samples on out_data, one per cycle, with
//               out_last on the final one; done pulses after it.
// The subcarriers should be supplied as one contiguous band (for IEEE
// 802.11a, bins -32..31 in that order): the zero padding then interpolates
// the band, shifted in frequency, which does not change sample magnitudes.
// Scaling: out = (1/8) * sum_k X_k exp(+j 2 pi k n / 64) when nothing is
// limited, so constellation amplitudes up to about 2^11 keep every stage
// in range. in_ready is high only during LOAD; out_valid has no back-pressure.
// cycles holds the cycle count of the last symbol from start to done.
// n_scaled counts polar-scaled time samples and n_limited the bins the
// cartesian limiter changed.
// The processing chain follows the soft-clipping method with the cartesian
// limiter; the interface, memory organisation and sequencing are this
// design's own.
module par_reducer
  import par_pkg::*;
#(
  parameter int MAX_PEAKS = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   par_factor,
  input  logic [DW-2:0] delta,
  input  logic          in_valid,
  input  cplx_t         in_data,
  output logic          in_ready,
  output logic          out_valid,
  output cplx_t         out_data,
  output logic          out_last,
  output logic          busy,
  output logic          done,
  output logic [7:0]    n_scaled,
  output logic [7:0]    n_limited,
  output logic [15:0]   cycles
);
  typedef enum logic [2:0] {
    T_IDLE, T_LOAD, T_IFFT, T_PLIM, T_FFT, T_IFFT64, T_OUT
  } tstate_e;

  tstate_e    st;
  logic [5:0] cnt;
  logic [15:0] par_r;
  logic [DW-2:0] delta_r;

  // ---------------- sample memory and its port multiplexer ----------------
  addr_t      m_rd_addr [4];
  cplx_t      m_rd_data [4];
  logic [3:0] m_wr_en;
  addr_t      m_wr_addr [4];
  cplx_t      m_wr_data [4];

  sample_memory #(.DEPTH(NFFT)) u_mem (
    .clk(clk), .rd_addr(m_rd_addr), .rd_data(m_rd_data),
    .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data)
  );

  // ---------------- reference constellation points -------------------------
  cplx_t      ref_mem [NSUB];
  logic [5:0] ref_addr;
  cplx_t      ref_data;

  always_ff @(posedge clk)
    if (st == T_LOAD && in_valid) ref_mem[cnt] <= in_data;
  assign ref_data = ref_mem[ref_addr];

  // ---------------- FFT engine ----------------------------------------------
  logic       fe_start, fe_done;
  logic [7:0] fe_n_limited;
  xform_e     fe_xform;
  addr_t      fe_rd_addr [4];
  logic [3:0] fe_wr_en;
  addr_t      fe_wr_addr [4];
  cplx_t      fe_wr_data [4];

  fft_engine u_fft (
    .clk(clk), .rst_n(rst_n), .start(fe_start), .xform(fe_xform),
    .lim_en(1'b1), .delta(delta_r),
    .busy(), .done(fe_done), .n_limited(fe_n_limited),
    .ref_addr(ref_addr), .ref_data(ref_data),
    .rd_addr(fe_rd_addr), .rd_data(m_rd_data),
    .wr_en(fe_wr_en), .wr_addr(fe_wr_addr), .wr_data(fe_wr_data)
  );

  // ---------------- power limiter -------------------------------------------
  logic       pl_start, pl_done, pl_wr_en;
  addr_t      pl_rd_addr [4];
  addr_t      pl_wr_addr;
  cplx_t      pl_wr_data;

  power_limiter #(.N(NFFT), .MAX_PEAKS(MAX_PEAKS)) u_plim (
    .clk(clk), .rst_n(rst_n), .start(pl_start), .par_factor(par_r),
    .rd_addr(pl_rd_addr), .rd_data(m_rd_data),
    .wr_en(pl_wr_en), .wr_addr(pl_wr_addr), .wr_data(pl_wr_data),
    .busy(), .done(pl_done), .n_scaled(n_scaled), .p_limit()
  );

  always_comb begin
    m_rd_addr = fe_rd_addr;
    m_wr_en   = fe_wr_en;
    m_wr_addr = fe_wr_addr;
    m_wr_data = fe_wr_data;
    case (st)
      T_LOAD: begin
        // after the skipped first DIT stage, bin k sits at 4*rev(k) + 0..3
        for (int i = 0; i < 4; i++) begin
          m_wr_addr[i] = {rev4_3(cnt), 2'(i)};
          m_wr_data[i] = in_data;
        end
        m_wr_en = {4{in_valid}};
      end
      T_PLIM: begin
        m_rd_addr = pl_rd_addr;
        m_wr_en   = {3'b000, pl_wr_en};
        m_wr_addr = '{pl_wr_addr, '0, '0, '0};
        m_wr_data = '{pl_wr_data, '0, '0, '0};
      end
      T_OUT: begin
        m_rd_addr = '{addr_t'(cnt), '0, '0, '0};
        m_wr_en   = '0;
      end
      default: ;
    endcase
  end

  // ---------------- sequencing ----------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      cnt       <= '0;
      par_r     <= '0;
      delta_r   <= '0;
      fe_start  <= 1'b0;
      fe_xform  <= XF_IFFT256_UP;
      pl_start  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      done      <= 1'b0;
      cycles    <= '0;
      n_limited <= '0;
    end else begin
      fe_start  <= 1'b0;
      pl_start  <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
      if (st != T_IDLE && cycles != 16'hffff) cycles <= cycles + 16'd1;
      case (st)
        T_IDLE: if (start) begin
          par_r   <= par_factor;
          delta_r <= delta;
          cnt     <= '0;
          cycles  <= 16'd1;
          st      <= T_LOAD;
        end
        T_LOAD: if (in_valid) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) begin
            fe_xform <= XF_IFFT256_UP;
            fe_start <= 1'b1;
            st       <= T_IFFT;
          end
        end
        T_IFFT: if (fe_done) begin
          pl_start <= 1'b1;
          st       <= T_PLIM;
        end
        T_PLIM: if (pl_done) begin
          fe_xform <= XF_FFT256_DOWN;
          fe_start <= 1'b1;
          st       <= T_FFT;
        end
        T_FFT: if (fe_done) begin
          n_limited <= fe_n_limited;  // the limiter acts only in this transform
          fe_xform <= XF_IFFT64;
          fe_start <= 1'b1;
          st       <= T_IFFT64;
        end
        T_IFFT64: if (fe_done) begin
          cnt <= '0;
          st  <= T_OUT;
        end
        T_OUT: begin
          out_valid <= 1'b1;
          out_data  <= m_rd_data[0];
          cnt       <= cnt + 6'd1;
          if (cnt == 6'd63) begin
            out_last <= 1'b1;
            done     <= 1'b1;
            st       <= T_IDLE;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  assign in_ready = (st == T_LOAD);
  assign busy     = (st != T_IDLE);

endmodule
