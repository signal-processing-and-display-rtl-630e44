// tb_vga_timing: runs the raster for two full frames at one pixel strobe
// every two clocks and measures it: 800 pixels per line, 525 lines per frame,
// 640x480 visible pixels, hsync low for 96 pixels starting 16 after the
// visible part, vsync low for 2 lines starting 10 lines after it.
module tb_vga_timing;
  logic clk = 1'b0, rst_n = 1'b0, pix_en = 1'b0;
  logic [9:0] x, y;
  logic video_on, hs_n, vs_n;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  vga_timing dut (.clk, .rst_n, .pix_en, .x, .y, .video_on, .hs_n, .vs_n);

  always @(posedge clk) pix_en <= rst_n && !pix_en;

  // independent model: pixel number within the frame
  int pix = 0, vis = 0, hs_low = 0, vs_low_px = 0, hs_edges = 0, vs_edges = 0, frames = 0;
  logic hs_prev = 1'b1, vs_prev = 1'b1;
  int px, ln;

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    // step to the first pixel of the next frame
    do begin @(posedge clk iff pix_en); #1; end while (!(x == 10'd0 && y == 10'd0));
    for (int f = 0; f < 2; f++) begin
      vis = 0; hs_low = 0; vs_low_px = 0; hs_edges = 0; vs_edges = 0;
      for (pix = 0; pix < 800 * 525; pix++) begin
        #1;
        px = pix % 800; ln = pix / 800;
        checks++;
        if (x != 10'(px) || y != 10'(ln)) begin
          failures++; if (failures < 10) $display("pixel %0d: x=%0d y=%0d", pix, x, y);
        end
        if (video_on) vis++;
        if (!hs_n) hs_low++;
        if (!vs_n) vs_low_px++;
        if (hs_prev && !hs_n) begin
          hs_edges++; checks++;
          if (px != 656) begin failures++; $display("hsync starts at %0d", px); end
        end
        if (vs_prev && !vs_n) begin
          vs_edges++; checks++;
          if (ln != 490 || px != 0) begin failures++; $display("vsync starts at line %0d px %0d", ln, px); end
        end
        hs_prev = hs_n; vs_prev = vs_n;
        @(posedge clk iff pix_en);
      end
      checks++; if (vis != 640 * 480) begin failures++; $display("visible %0d", vis); end
      checks++; if (hs_low != 96 * 525) begin failures++; $display("hsync low %0d", hs_low); end
      checks++; if (vs_low_px != 2 * 800) begin failures++; $display("vsync low %0d", vs_low_px); end
      checks++; if (hs_edges != 525) begin failures++; $display("hsync pulses %0d", hs_edges); end
      checks++; if (vs_edges != 1) begin failures++; $display("vsync pulses %0d", vs_edges); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
