// signal_processor: range processing of the LFM CW radar, one sweep at a time.
//
// Chain (all in the 50 MHz clk domain, slower parts run on enables):
//   clk_divider  -> sample_en, the 50 kHz sampling strobe (also the ADC's
//                   conversion clock, brought out as `sample_en`);
//   sweep_sync   -> vco_trig, the sawtooth sweep trigger every 16.7 ms;
//   start_delay  -> start of processing, one sampling period after vco_trig;
//   fft_core     -> 128-point FFT of the ADC samples (imaginary input grounded),
//                   bins delivered one per sampling period in range order;
//   squarer x2, mag_adder, isqrt -> |X[k]| = sqrt(re^2 + im^2);
//   threshold_comparator -> target present when |X[k]| > threshold*16.
// The block order is the document's. This design's choices: the 6-bit ADC
// word, offset binary over 0..5 V, has its MSB inverted to become two's
// complement, so the DC offset added before the ADC does not appear in bin
// 0; and the bin index is held while its magnitude is found, then presented
// with the decision. Timing: each result (`res_valid` pulse with `res_bin`,
// `res_mag`, `res_detect`) comes 21 clk cycles after its bin leaves the FFT,
// well inside one sampling period. `fft_start` and `fft_busy` show the FFT's
// frame timing. `res_bin` is the FFT bin 0..N-1; the
// buffer keeps only the useful lower half.
module signal_processor #(
  parameter int unsigned SAMPLE_DIV    = 1000,
  parameter int unsigned SWEEP_SAMPLES = 835,
  parameter int unsigned DELAY_SAMPLES = 1,
  parameter int unsigned N             = 128,
  parameter int unsigned ADC_W         = 6,
  parameter int unsigned DW            = 16,
  parameter int unsigned TW_W          = 12,
  parameter int unsigned THR_W         = 8,
  parameter int unsigned THR_SHIFT     = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADC_W-1:0]     adc_data,
  input  logic [THR_W-1:0]     threshold,
  output logic                 sample_en,
  output logic                 vco_trig,
  output logic                 fft_start,
  output logic                 fft_busy,
  output logic                 res_valid,
  output logic [$clog2(N)-1:0] res_bin,
  output logic [DW:0]          res_mag,
  output logic                 res_detect
);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned SQ_W  = 2 * DW;
  localparam int unsigned RAD_W = 2 * DW + 2;   // even radicand width
  localparam int unsigned MAG_W = DW + 1;

  // the magnitude pipeline must finish before the next bin arrives
  initial assert (SAMPLE_DIV > 24) else $error("SAMPLE_DIV too small for the magnitude pipeline");

  clk_divider #(.DIV(SAMPLE_DIV)) u_div (.clk, .rst_n, .tick(sample_en));

  sweep_sync #(.SWEEP_SAMPLES(SWEEP_SAMPLES)) u_sync (
    .clk, .rst_n, .sample_en, .vco_trig
  );

  start_delay #(.DELAY_SAMPLES(DELAY_SAMPLES)) u_delay (
    .clk, .rst_n, .sample_en, .trig_in(vco_trig), .start_out(fft_start)
  );

  logic signed [ADC_W-1:0] din_re;
  assign din_re = signed'({~adc_data[ADC_W-1], adc_data[ADC_W-2:0]});

  logic                   fft_valid;
  logic [LOGN-1:0]        fft_idx;
  logic signed [DW-1:0]   fft_re, fft_im;

  fft_core #(.N(N), .IN_W(ADC_W), .DW(DW), .TW_W(TW_W)) u_fft (
    .clk, .rst_n, .sample_en, .start(fft_start),
    .din_re, .din_im('0),
    .busy(fft_busy), .out_valid(fft_valid), .out_idx(fft_idx),
    .out_re(fft_re), .out_im(fft_im)
  );

  logic            sq_valid_re, sq_valid_im;
  logic [SQ_W-1:0] sq_re, sq_im;

  squarer #(.W(DW)) u_mul_re (.clk, .rst_n, .in_valid(fft_valid), .x(fft_re),
                              .out_valid(sq_valid_re), .p(sq_re));
  squarer #(.W(DW)) u_mul_im (.clk, .rst_n, .in_valid(fft_valid), .x(fft_im),
                              .out_valid(sq_valid_im), .p(sq_im));

  logic            sum_valid;
  logic [SQ_W:0]   sum;
  mag_adder #(.W(SQ_W)) u_add (.clk, .rst_n, .in_valid(sq_valid_re & sq_valid_im),
                               .a(sq_re), .b(sq_im), .out_valid(sum_valid), .sum);

  logic             mag_valid;
  logic [MAG_W-1:0] mag;
  isqrt #(.W(RAD_W)) u_sqrt (.clk, .rst_n, .in_valid(sum_valid), .x(RAD_W'(sum)),
                             .out_valid(mag_valid), .root(mag));

  logic cmp_valid;
  threshold_comparator #(.MAG_W(MAG_W), .THR_W(THR_W), .THR_SHIFT(THR_SHIFT)) u_cmp (
    .clk, .rst_n, .in_valid(mag_valid), .mag, .thr(threshold),
    .out_valid(cmp_valid), .detect(res_detect)
  );

  // bin index and magnitude travel alongside the pipeline
  logic [LOGN-1:0] bin_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bin_q   <= '0;
      res_mag <= '0;
    end else begin
      if (fft_valid) bin_q <= fft_idx;
      if (mag_valid) res_mag <= mag;
    end
  end

  assign res_valid = cmp_valid;
  assign res_bin   = bin_q;
endmodule
