// radar_pkg: constants and types shared by the LFM CW radar signal processor
// and its B-scope display.
//
// The numbers follow the radar's design table: 50 MHz board clock, 50 kHz
// sampling, a 128-point FFT of which the lower 64 bins are useful range bins
// (18.75 m each, 1200 m in all), a 6-bit ADC, a 9-bit azimuth count and a
// 32 x 32 cell B-scope on a 640x480 screen. The colour type is one bit per
// channel, the colour depth of the target board's VGA port.
package radar_pkg;
  localparam int unsigned CLK_HZ      = 50_000_000;
  localparam int unsigned SAMPLE_HZ   = 50_000;
  localparam int unsigned SAMPLE_DIV  = CLK_HZ / SAMPLE_HZ;  // 1000
  localparam int unsigned PIXEL_DIV   = 2;                   // 25 MHz pixel rate
  localparam int unsigned ADC_W       = 6;
  localparam int unsigned FFT_N       = 128;
  localparam int unsigned RANGE_BINS  = FFT_N / 2;           // 64 useful bins
  localparam int unsigned AZIMUTH_W   = 9;
  localparam int unsigned THR_W       = 8;
  localparam int unsigned DISP_COLS   = 32;
  localparam int unsigned DISP_ROWS   = 32;

  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb_t;

  localparam rgb_t RGB_BLACK = '{r: 1'b0, g: 1'b0, b: 1'b0};
  localparam rgb_t RGB_WHITE = '{r: 1'b1, g: 1'b1, b: 1'b1};
  localparam rgb_t RGB_RED   = '{r: 1'b1, g: 1'b0, b: 1'b0};
  localparam rgb_t RGB_GREEN = '{r: 1'b0, g: 1'b1, b: 1'b0};
  localparam rgb_t RGB_BLUE  = '{r: 1'b0, g: 1'b0, b: 1'b1};
endpackage
