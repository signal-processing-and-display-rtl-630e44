// display_addr_gen: maps the pixel being drawn to a cell of the B-scope.
//
// The B-scope is NCOL azimuth columns by NROW range rows of CELL_W x CELL_H
// pixels, with its top-left corner at (X0, Y0). Range grows upwards, so the
// bottom row is range bin 0. For pixel (x, y) it gives: `in_plot`, the pixel
// lies in the grid including its closing right and bottom lines; `on_grid`,
// the pixel is on a grid line (first column or first line of a cell, or a
// closing line); `col`, the azimuth column; `row`, the range row, which is also
// the read address of the range buffer. Purely combinational. The grid of 32
// by 32 cells is the document's; the placement and cell size are this
// design's choice, filling most of the 640x480 screen.
module display_addr_gen #(
  parameter int unsigned NCOL   = 32,
  parameter int unsigned NROW   = 32,
  parameter int unsigned X0     = 64,
  parameter int unsigned Y0     = 48,
  parameter int unsigned CELL_W = 16,
  parameter int unsigned CELL_H = 12
) (
  input  logic [9:0]                x,
  input  logic [9:0]                y,
  output logic                      in_plot,
  output logic                      on_grid,
  output logic [$clog2(NCOL)-1:0]   col,
  output logic [$clog2(NROW)-1:0]   row
);
  localparam int unsigned X_END = X0 + NCOL * CELL_W;   // closing line
  localparam int unsigned Y_END = Y0 + NROW * CELL_H;
  localparam int unsigned CW    = $clog2(NCOL);
  localparam int unsigned RW    = $clog2(NROW);

  logic [9:0] dx, dy, cx, cy;
  always_comb begin
    dx      = x - 10'(X0);
    dy      = y - 10'(Y0);
    in_plot = (x >= 10'(X0)) && (x <= 10'(X_END)) && (y >= 10'(Y0)) && (y <= 10'(Y_END));
    cx      = dx / 10'(CELL_W);
    cy      = dy / 10'(CELL_H);
    on_grid = (x == 10'(X_END)) || (y == 10'(Y_END)) ||
              (dx % 10'(CELL_W) == '0) || (dy % 10'(CELL_H) == '0);
    col     = (cx >= 10'(NCOL)) ? CW'(NCOL - 1) : CW'(cx);
    row     = (cy >= 10'(NROW)) ? '0 : RW'(NROW - 1) - RW'(cy);
  end
endmodule
