// tb_radar_range_limits: full-size run of the whole design at the ends of
// its range scale. The beat signal holds two echoes:
//   - 20 kHz, the largest beat frequency the radar is built for (1200 m):
//     20 kHz / 50 kHz * 128 = bin 51.2, off the bin grid, so its energy
//     spreads; bin 51 must still be detected and its neighbours not;
//   - bin 31 (581 m), the farthest range the 32-row B-scope draws.
// Checks over five display frames: each complete sweep detects exactly bins
// 31 and 51; in frame 4 the antenna's column shows a target in the top row
// only (bin 51 is stored but lies beyond the drawn 600 m), every other cell
// is empty, and the far target is counted.
module tb_radar_range_limits;
  import radar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] adc_data = 6'd32;
  logic [7:0] threshold = 8'd40;            // magnitude 640
  logic [8:0] azimuth = 9'd300;             // column 18
  logic adc_sample, vco_trig, vga_r, vga_g, vga_b, vga_hs, vga_vs;
  logic [9:0] pix_x, pix_y;
  rgb_t ovl_rgb = '{r: 1'b0, g: 1'b0, b: 1'b0};
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  radar_top dut (.clk, .rst_n, .adc_data, .adc_sample, .vco_trig, .threshold, .azimuth,
                 .pix_x, .pix_y, .ovl_on(1'b0), .ovl_rgb, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  int n = 0;
  always @(posedge clk) if (adc_sample) begin
    real v;
    n = n + 1;
    v = 31.5 + 14.0 * $sin(2.0 * 3.141592653589793 * 20000.0 * n / 50000.0)
             + 14.0 * $cos(2.0 * 3.141592653589793 * 31.0 * n / 128.0);
    adc_data <= 6'($rtoi($floor(v + 0.5)));
  end

  // ---- detections of every complete sweep --------------------------------
  logic [63:0] det = '0;
  int sweeps = 0, far_hits = 0;
  always @(posedge clk) if (rst_n && dut.u_sp.res_valid) begin
    if (dut.u_sp.res_bin < 7'd64 && dut.u_sp.res_detect) det[dut.u_sp.res_bin[5:0]] = 1'b1;
    if (dut.u_sp.res_bin == 7'd127) begin
      checks++;
      if (det != ((64'd1 << 31) | (64'd1 << 51))) begin failures++; $display("sweep %0d detections %h", sweeps, det); end
      if (det[51]) far_hits++;
      det = '0;
      sweeps++;
    end
  end

  // ---- picture of frame 4 ---------------------------------------------------
  int frame = -1, prev_x = 0, prev_y = 0, px, py, bad = 0, greens = 0;
  always @(posedge clk) if (dut.pix_en) begin
    px = int'(pix_x); py = int'(pix_y);
    #1;
    if (frame == 4 && prev_x >= 64 && prev_x < 576 && prev_y >= 48 && prev_y < 432 &&
        (prev_x - 64) % 16 == 8 && (prev_y - 48) % 12 == 6) begin
      int c, r;
      logic [2:0] want;
      c = (prev_x - 64) / 16; r = 31 - (prev_y - 48) / 12;
      want = (c == 18) ? ((r == 31) ? 3'b010 : 3'b001) : 3'b111;
      checks++;
      if ({vga_r, vga_g, vga_b} != want) begin
        failures++; bad++;
        if (bad < 6) $display("cell (az %0d, range %0d): %b want %b", c, r, {vga_r, vga_g, vga_b}, want);
      end
      if (want == 3'b010) greens++;
    end
    if (prev_x == 0 && prev_y == 490) frame++;
    prev_x = px; prev_y = py;
  end

  initial begin
    repeat (5) @(posedge clk); rst_n <= 1'b1;
    wait (frame == 5);
    checks++; if (sweeps < 4) begin failures++; $display("only %0d sweeps", sweeps); end
    checks++; if (far_hits == 0) begin failures++; $display("20 kHz echo never detected"); end
    checks++; if (greens != 1) begin failures++; $display("top-row target drawn %0d times", greens); end
    $display("sweeps %0d, 20 kHz detections %0d", sweeps, far_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
