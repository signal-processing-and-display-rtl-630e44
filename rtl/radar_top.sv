// radar_top: signal processor and B-scope display of an LFM CW radar on one
// FPGA.
//
// The radar sweeps its transmit frequency in a sawtooth; the echo mixed with
// the transmitted signal leaves a beat tone whose frequency is proportional to
// target range. This top takes that beat signal from a 6-bit ADC at 50 kHz,
// finds its spectrum with a 128-point FFT once per 16.7 ms sweep, marks the
// range bins whose magnitude exceeds a switch-set threshold, and draws them on
// a 640x480 VGA B-scope (azimuth across, range up) against the antenna
// azimuth.
//
//   clk (50 MHz) --+-- signal_processor: divider /1000 -> sweep_sync ->
//                  |     start_delay -> fft_core -> squarers -> mag_adder ->
//                  |     isqrt -> threshold_comparator
//                  |         | bin index (write address), detection, 50 kHz
//                  |         v
//                  |   pingpong_buffer (two RAMs swapped by vsync / 2)
//                  |         ^ range row (read address), 25 MHz
//                  +-- clk_divider /2 -> vga_timing -> display_addr_gen
//                                           \-> bscope_display -> R G B HS VS
//
// Everything runs on the one 50 MHz clock; the 50 kHz sampling rate and the
// 25 MHz pixel rate are enables. Outside parts attach through ports: the ADC
// (`adc_data`, converted at each `adc_sample` strobe), the VCO control
// (`vco_trig`), the threshold switches, the antenna's azimuth count, and the
// annotation image memories, which get the raster position `pix_x`,`pix_y`
// and must return their pixel (`ovl_on`,`ovl_rgb`) one pixel period
// (two clk cycles) later. The signal processor's status outputs (fft_start,
// fft_busy, res_mag) and the buffer's bank select are not needed by any
// other block here; they stay internal and are observed in simulation.
module radar_top
  import radar_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADC_W-1:0]     adc_data,
  output logic                 adc_sample,
  output logic                 vco_trig,
  input  logic [THR_W-1:0]     threshold,
  input  logic [AZIMUTH_W-1:0] azimuth,
  output logic [9:0]           pix_x,
  output logic [9:0]           pix_y,
  input  logic                 ovl_on,
  input  rgb_t                 ovl_rgb,
  output logic                 vga_r,
  output logic                 vga_g,
  output logic                 vga_b,
  output logic                 vga_hs,
  output logic                 vga_vs
);
  localparam int unsigned LOGN = $clog2(FFT_N);
  localparam int unsigned RW   = $clog2(DISP_ROWS);
  localparam int unsigned CW   = $clog2(DISP_COLS);

  // ---- signal processing ---------------------------------------------------
  logic            sample_en, fft_start, fft_busy;
  logic            res_valid, res_detect;
  logic [LOGN-1:0] res_bin;
  logic [16:0]     res_mag;

  signal_processor #(
    .SAMPLE_DIV(SAMPLE_DIV), .N(FFT_N), .ADC_W(ADC_W), .THR_W(THR_W)
  ) u_sp (
    .clk, .rst_n, .adc_data, .threshold,
    .sample_en, .vco_trig, .fft_start, .fft_busy,
    .res_valid, .res_bin, .res_mag, .res_detect
  );
  assign adc_sample = sample_en;

  // ---- display timing ---------------------------------------------------
  logic       pix_en, video_on, hs_n, vs_n;
  logic [9:0] x, y;

  clk_divider #(.DIV(PIXEL_DIV)) u_pix_div (.clk, .rst_n, .tick(pix_en));

  vga_timing u_vga (.clk, .rst_n, .pix_en, .x, .y, .video_on, .hs_n, .vs_n);

  logic          in_plot, on_grid;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  display_addr_gen #(.NCOL(DISP_COLS), .NROW(DISP_ROWS)) u_addr (
    .x, .y, .in_plot, .on_grid, .col, .row
  );

  // ---- buffering between the two rates ------------------------------------
  logic buf_bit, bank;
  pingpong_buffer #(.DEPTH(RANGE_BINS), .W(1)) u_buf (
    .clk, .rst_n, .vs_n,
    .wr_en(res_valid), .wr_addr(res_bin), .wr_data(res_detect),
    .rd_en(pix_en), .rd_addr($clog2(RANGE_BINS)'(row)), .rd_data(buf_bit),
    .bank
  );

  // ---- display program ----------------------------------------------------
  bscope_display #(.NCOL(DISP_COLS), .NROW(DISP_ROWS), .AZ_W(AZIMUTH_W)) u_disp (
    .clk, .rst_n, .pix_en, .video_on, .hs_n, .vs_n,
    .in_plot, .on_grid, .col, .row, .buf_bit,
    .azimuth, .ovl_on, .ovl_rgb,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs
  );

  assign pix_x = x;
  assign pix_y = y;
endmodule
