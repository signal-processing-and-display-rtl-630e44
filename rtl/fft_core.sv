// fft_core: N-point (default 128) radix-2 FFT of the sampled beat signal.
//
// The radar finds target range as the beat frequency, so each sweep's N
// samples are transformed and the bins are delivered in range order. The
// document fixes the transform size, its real and imaginary inputs (the
// imaginary one grounded), its start input and its sampling-rate clock, and
// that the bins leave at the sampling rate with their index as the buffer
// address. How the FFT is built is this design's choice, the simplest that
// meets those rates:
//   LOAD    on each `sample_en` strobe one sample is written to the working
//           memory at the bit-reversed address of its index. Loading begins
//           on the first strobe at which `start` is high (that strobe's
//           sample is sample 0) and takes N strobes.
//   CALC    log2(N) stages of N/2 in-place decimation-in-time butterflies,
//           one butterfly per clk cycle: (N/2)*log2(N) = 448 cycles, about
//           half of one sampling period at 50 MHz.
//   UNLOAD  on each following `sample_en` strobe one bin leaves, in natural
//           order 0..N-1: `out_valid` pulses for one cycle with `out_idx`,
//           `out_re` and `out_im`.
// A start seen while a frame is in progress is ignored; `busy` is high from
// the first sample to the last bin. Arithmetic is unscaled: DW bits hold the
// input plus log2(N) bits of growth. Twiddles are round(cos/-sin * 2^(TW_W-2))
// and are computed at elaboration; each product is rounded to nearest.
module fft_core #(
  parameter int unsigned N    = 128,
  parameter int unsigned IN_W = 6,
  parameter int unsigned DW   = 16,
  parameter int unsigned TW_W = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample_en,
  input  logic                   start,
  input  logic signed [IN_W-1:0] din_re,
  input  logic signed [IN_W-1:0] din_im,
  output logic                   busy,
  output logic                   out_valid,
  output logic [$clog2(N)-1:0]   out_idx,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned SW   = $clog2(LOGN + 1);
  localparam int unsigned FRAC = TW_W - 2;

  typedef logic signed [DW-1:0]   data_t;
  typedef logic signed [TW_W-1:0] tw_t;
  typedef logic [LOGN-1:0]        idx_t;
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_CALC, S_UNLOAD} state_t;

  // ---- twiddle tables W^k = exp(-j*2*pi*k/N), k = 0..N/2-1 -------------
  function automatic tw_t [N/2-1:0] gen_cos();
    for (int k = 0; k < N / 2; k++)
      gen_cos[k] = tw_t'($rtoi($floor($cos(2.0 * 3.141592653589793 * k / N) * (2.0 ** FRAC) + 0.5)));
  endfunction
  function automatic tw_t [N/2-1:0] gen_msin();
    for (int k = 0; k < N / 2; k++)
      gen_msin[k] = tw_t'($rtoi($floor(-$sin(2.0 * 3.141592653589793 * k / N) * (2.0 ** FRAC) + 0.5)));
  endfunction
  localparam tw_t [N/2-1:0] TW_COS  = gen_cos();
  localparam tw_t [N/2-1:0] TW_MSIN = gen_msin();

  function automatic idx_t bitrev(idx_t i);
    for (int b = 0; b < int'(LOGN); b++) bitrev[b] = i[LOGN-1-b];
  endfunction

  // ---- state -----------------------------------------------------------
  state_t          state;
  idx_t            cnt;     // sample index (LOAD) or bin index (UNLOAD)
  logic [SW-1:0]   stage;   // butterfly stage 0..LOGN-1
  logic [LOGN-2:0] bfly;    // butterfly within the stage 0..N/2-1
  data_t           mem_re [N];
  data_t           mem_im [N];

  // ---- butterfly addressing and arithmetic ------------------------------
  idx_t  span, i0, i1;
  logic [LOGN-2:0] pos, tw_idx;
  data_t a_re, a_im, b_re, b_im, t_re, t_im;
  tw_t   w_re, w_im;
  logic signed [DW+TW_W-1:0] m_rr, m_ii, m_ri, m_ir;
  logic signed [DW+TW_W:0]   prod_re, prod_im;

  always_comb begin
    span   = idx_t'(1) << stage;
    pos    = bfly & (LOGN-1)'(span - 1'b1);
    i0     = ((idx_t'(bfly) >> stage) << (stage + 1'b1)) | idx_t'(pos);
    i1     = i0 | span;
    tw_idx = pos << (SW'(LOGN - 1) - stage);
    w_re   = TW_COS[tw_idx];
    w_im   = TW_MSIN[tw_idx];
    a_re   = mem_re[i0];
    a_im   = mem_im[i0];
    b_re   = mem_re[i1];
    b_im   = mem_im[i1];
    m_rr   = b_re * w_re;
    m_ii   = b_im * w_im;
    m_ri   = b_re * w_im;
    m_ir   = b_im * w_re;
    prod_re = m_rr - m_ii + (DW+TW_W+1)'(1 << (FRAC - 1));
    prod_im = m_ri + m_ir + (DW+TW_W+1)'(1 << (FRAC - 1));
    t_re   = data_t'(prod_re >>> FRAC);
    t_im   = data_t'(prod_im >>> FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      stage     <= '0;
      bfly      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (sample_en && start) begin
          mem_re[bitrev('0)] <= data_t'(din_re);
          mem_im[bitrev('0)] <= data_t'(din_im);
          cnt   <= idx_t'(1);
          state <= S_LOAD;
        end
        S_LOAD: if (sample_en) begin
          mem_re[bitrev(cnt)] <= data_t'(din_re);
          mem_im[bitrev(cnt)] <= data_t'(din_im);
          cnt <= cnt + 1'b1;
          if (cnt == idx_t'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_CALC: begin
          mem_re[i0] <= a_re + t_re;
          mem_im[i0] <= a_im + t_im;
          mem_re[i1] <= a_re - t_re;
          mem_im[i1] <= a_im - t_im;
          bfly <= bfly + 1'b1;
          if (&bfly) begin
            stage <= stage + 1'b1;
            if (stage == SW'(LOGN - 1)) begin
              state <= S_UNLOAD;
              cnt   <= '0;
            end
          end
        end
        S_UNLOAD: if (sample_en) begin
          out_valid <= 1'b1;
          out_idx   <= cnt;
          out_re    <= mem_re[cnt];
          out_im    <= mem_im[cnt];
          cnt <= cnt + 1'b1;
          if (cnt == idx_t'(N - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
