// bscope_display: the display program that draws the radar's B-scope.
//
// A B-scope shows azimuth across and range upwards. The grid has NCOL
// azimuth columns and NROW range rows; a detected target is a green square in
// its (azimuth, range) cell. A column-wide vertical bar, the running time base,
// marks the antenna's current azimuth. Each frame, the cells of the current
// column are refreshed from the range buffer (the detections of the last
// complete sweep, read one range row at a time as the raster passes); every
// other column shows what was stored when the antenna last pointed there, kept
// in a NROW x NCOL bit cell memory, which starts out empty (all zero, as an
// FPGA block RAM is after configuration) and is not cleared by reset. Annotation images (title, logo, axis
// labels) come in from outside as `ovl_on`/`ovl_rgb` and are drawn on top.
//
// Colours, in priority order: blanking black; annotation; inside the grid:
// grid line red, target green, time base blue, empty cell white; outside the
// grid blue. One bit per colour channel.
//
// Pipeline, advancing on `pix_en`: stage 0 is the raster position (video_on,
// syncs and the cell decode of the current pixel) presented at the inputs,
// when the range buffer read for `row` is also issued; stage 1 holds it with
// the cell-memory word and receives `buf_bit` and the annotation pixel; stage
// 2 is the registered VGA output. R, G, B, HS and VS all come out two pixel
// periods after their raster position, so they stay aligned. The azimuth
// column is the top bits of the AZ_W-bit azimuth count, latched at the start
// of each vertical sync.
//
// From the document: the 32 x 32 grid, green target squares, the 9-bit
// azimuth driving the running time base, the five VGA signals. This design's
// own: the cell memory that keeps other columns' targets, the colours other
// than green, the azimuth-to-column mapping and the pipeline.
module bscope_display
  import radar_pkg::*;
#(
  parameter int unsigned NCOL = 32,
  parameter int unsigned NROW = 32,
  parameter int unsigned AZ_W = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_en,
  input  logic                    video_on,
  input  logic                    hs_n,
  input  logic                    vs_n,
  input  logic                    in_plot,
  input  logic                    on_grid,
  input  logic [$clog2(NCOL)-1:0] col,
  input  logic [$clog2(NROW)-1:0] row,
  input  logic                    buf_bit,
  input  logic [AZ_W-1:0]         azimuth,
  input  logic                    ovl_on,
  input  rgb_t                    ovl_rgb,
  output logic                    vga_r,
  output logic                    vga_g,
  output logic                    vga_b,
  output logic                    vga_hs,
  output logic                    vga_vs
);
  localparam int unsigned CW = $clog2(NCOL);
  localparam int unsigned RW = $clog2(NROW);

  // ---- current azimuth column, latched once per frame ----------------------
  logic [CW-1:0] az_col;
  logic          vs_prev;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      az_col  <= '0;
      vs_prev <= 1'b1;
    end else if (pix_en) begin
      vs_prev <= vs_n;
      if (vs_prev && !vs_n) az_col <= azimuth[AZ_W-1 -: CW];
    end
  end

  // ---- cell memory: one bit per (range row, azimuth column) ---------------
  logic cell_mem [NROW*NCOL];
  initial for (int i = 0; i < int'(NROW * NCOL); i++) cell_mem[i] = 1'b0;

  // ---- stage 1 ----------------------------------------------------------
  logic          v1, hs1, vs1, plot1, grid1, cell1;
  logic [CW-1:0] col1;
  logic [RW-1:0] row1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; hs1 <= 1'b1; vs1 <= 1'b1; plot1 <= 1'b0; grid1 <= 1'b0;
      col1 <= '0; row1 <= '0;
    end else if (pix_en) begin
      v1 <= video_on; hs1 <= hs_n; vs1 <= vs_n; plot1 <= in_plot; grid1 <= on_grid;
      col1 <= col; row1 <= row;
    end
  end
  always_ff @(posedge clk) begin
    if (pix_en) cell1 <= cell_mem[{row, col}];
  end

  // ---- stage 2: colour ----------------------------------------------------
  logic now_col, target, refresh;
  rgb_t colour;
  always_comb begin
    now_col = (col1 == az_col);
    target  = now_col ? buf_bit : cell1;
    refresh = v1 && plot1 && !grid1 && now_col;
    if (!v1)           colour = RGB_BLACK;
    else if (ovl_on)   colour = ovl_rgb;
    else if (plot1) begin
      if (grid1)        colour = RGB_RED;
      else if (target)  colour = RGB_GREEN;
      else if (now_col) colour = RGB_BLUE;
      else              colour = RGB_WHITE;
    end
    else               colour = RGB_BLUE;
  end

  always_ff @(posedge clk) begin
    if (pix_en && refresh) cell_mem[{row1, col1}] <= buf_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {vga_r, vga_g, vga_b} <= '0;
      vga_hs <= 1'b1;
      vga_vs <= 1'b1;
    end else if (pix_en) begin
      {vga_r, vga_g, vga_b} <= colour;
      vga_hs <= hs1;
      vga_vs <= vs1;
    end
  end
endmodule
