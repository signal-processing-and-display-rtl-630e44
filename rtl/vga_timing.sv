// vga_timing: 640x480 VGA raster timing at the 25 MHz pixel rate.
//
// Horizontal and vertical counters advance on each `pix_en` strobe. A line is
// H_VIS visible pixels, then front porch, sync pulse and back porch (800 in
// all); a frame is V_VIS visible lines, then front porch, sync and back porch
// (525 in all), giving 60 Hz frames. `x`,`y` are the counters; `video_on` is
// high inside the visible area; `hs_n`,`vs_n` are the active-low sync pulses.
// All outputs are decoded from the counters and change on the clk edge where
// pix_en is high. The 640x480 resolution is the document's; the porch and
// sync lengths are the standard values for that mode, which the document
// refers to without printing.
module vga_timing #(
  parameter int unsigned H_VIS  = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_VIS  = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_en,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       video_on,
  output logic       hs_n,
  output logic       vs_n
);
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (pix_en) begin
      if (x == 10'(H_TOT - 1)) begin
        x <= '0;
        y <= (y == 10'(V_TOT - 1)) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  assign video_on = (x < 10'(H_VIS)) && (y < 10'(V_VIS));
  assign hs_n     = !((x >= 10'(H_VIS + H_FP)) && (x < 10'(H_VIS + H_FP + H_SYNC)));
  assign vs_n     = !((y >= 10'(V_VIS + V_FP)) && (y < 10'(V_VIS + V_FP + V_SYNC)));
endmodule
