// tb_radar_top: end-to-end run of the whole radar processor and display at
// full size (50 MHz clock, 50 kHz sampling, 835-sample sweeps, 640x480 at
// 60 Hz), ten display frames, about 0.17 s of radar time.
//
// The ADC is driven with a synthetic beat signal: in scene A two targets at
// range bins 8 (150 m) and 20 (375 m) plus a weak echo at bin 14 that must
// stay below the threshold (40, i.e. magnitude 640), with the antenna at
// azimuth column 3; in scene B, from frame 6, one target at bin 12 with the
// antenna at column 10. An annotation source paints a band across the top.
// Checks:
//   - control timing: ADC strobe every 1000 clocks, VCO trigger every
//     835 000 clocks (16.7 ms), FFT start 1000 clocks (20 us) after it,
//     vsync every 840 000 clocks and hsync every 1600 clocks;
//   - each sweep's detections are exactly the scene's bins;
//   - the picture: every cell of frame 4 (scene A) and frame 9 (scene B,
//     with scene A's targets kept in column 3) has the expected colour;
//   - every mechanism happened: sweeps, FFT frames, detections, threshold
//     rejections, dropped mirror bins, buffer swaps, time base, stored
//     targets, annotation.
module tb_radar_top;
  import radar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] adc_data = 6'd32;
  logic [7:0] threshold = 8'd40;
  logic [8:0] azimuth = 9'd55;              // column 3
  logic adc_sample, vco_trig, vga_r, vga_g, vga_b, vga_hs, vga_vs;
  logic [9:0] pix_x, pix_y;
  logic ovl_on = 1'b0;
  rgb_t ovl_rgb = '{r: 1'b1, g: 1'b0, b: 1'b1};
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  radar_top dut (.clk, .rst_n, .adc_data, .adc_sample, .vco_trig, .threshold, .azimuth,
                 .pix_x, .pix_y, .ovl_on, .ovl_rgb, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  // ---- beat signal ---------------------------------------------------------
  int scene = 0;
  int n = 0;
  function automatic logic [5:0] adc(int k, int sc);
    real v, w;
    w = 2.0 * 3.141592653589793 / 128.0;
    if (sc == 0) v = 31.5 + 16.0 * $sin(w * 8 * k) + 12.0 * $cos(w * 20 * k + 1.0) + 3.0 * $sin(w * 14 * k);
    else         v = 31.5 + 24.0 * $sin(w * 12 * k + 0.5);
    return 6'($rtoi($floor(v + 0.5)));
  endfunction

  // ---- counters ------------------------------------------------------------
  longint cyc = 0;
  longint t_adc = -1, t_trig = -1, t_vs = -1, t_hs = -1;
  logic trig_q = 1'b0, start_q = 1'b0, vs_q = 1'b1, hs_q = 1'b1, bank_q = 1'b0;
  int n_sweeps = 0, n_fft = 0, n_det = 0, n_reject = 0, n_mirror = 0, n_swaps = 0;
  int n_timebase = 0, n_stored = 0, n_ovl = 0;
  int sweep_scene_start = -1;
  logic [63:0] det_bins = '0;
  int bins_seen = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (adc_sample) begin
      if (t_adc >= 0) begin
        checks++; if (cyc - t_adc != 1000) begin failures++; $display("ADC strobe period %0d", cyc - t_adc); end
      end
      t_adc = cyc;
      n = n + 1;
      adc_data <= adc(n, scene);
    end
    trig_q <= vco_trig;
    if (rst_n && vco_trig && !trig_q) begin
      if (t_trig >= 0) begin
        checks++; if (cyc - t_trig != 835000) begin failures++; $display("sweep period %0d", cyc - t_trig); end
      end
      t_trig = cyc; n_sweeps++;
    end
    start_q <= dut.u_sp.fft_start;
    if (rst_n && dut.u_sp.fft_start && !start_q) begin
      checks++; if (cyc - t_trig != 1000) begin failures++; $display("start delay %0d", cyc - t_trig); end
      n_fft++;
      sweep_scene_start = scene;
    end
    if (dut.u_sp.res_valid) begin
      if (dut.u_sp.res_bin >= 7'd64) n_mirror++;
      else begin
        if (dut.u_sp.res_detect) begin n_det++; det_bins[dut.u_sp.res_bin[5:0]] = 1'b1; end
        else if (dut.u_sp.res_mag > 17'd100) n_reject++;
      end
      if (dut.u_sp.res_bin == 7'd127) begin
        // a sweep whose samples all came from one scene must show its bins
        if (sweep_scene_start == scene && n_fft > 0) begin
          checks++;
          if (det_bins != ((scene == 0) ? ((64'd1 << 8) | (64'd1 << 20)) : (64'd1 << 12))) begin
            failures++; $display("sweep %0d detections %h", n_fft, det_bins);
          end
        end
        det_bins = '0;
      end
    end
    bank_q <= dut.u_buf.bank;
    if (dut.u_buf.bank != bank_q && cyc > 10) n_swaps++;
    vs_q <= vga_vs; hs_q <= vga_hs;
    if (!vga_vs && vs_q && cyc > 20) begin
      if (t_vs >= 0) begin
        checks++; if (cyc - t_vs != 840000) begin failures++; $display("frame period %0d", cyc - t_vs); end
      end
      t_vs = cyc;
    end
    if (!vga_hs && hs_q && cyc > 20) begin
      if (t_hs >= 0) begin
        checks++; if (cyc - t_hs != 1600) begin failures++; $display("line period %0d", cyc - t_hs); end
      end
      t_hs = cyc;
    end
  end

  // ---- annotation source: one pixel of latency ------------------------------
  always @(posedge clk) if (dut.pix_en) ovl_on <= (pix_y < 10'd16);

  // ---- picture capture -------------------------------------------------------
  int frame = -1, prev_x = 0, prev_y = 0, px, py, cur_col = 0;
  logic [2:0] img [32][32];
  always @(posedge clk) if (dut.pix_en) begin
    px = int'(pix_x); py = int'(pix_y);
    #1;
    if (prev_x >= 64 && prev_x < 576 && prev_y >= 48 && prev_y < 432 &&
        (prev_x - 64) % 16 == 8 && (prev_y - 48) % 12 == 6)
      img[(prev_x - 64) / 16][31 - (prev_y - 48) / 12] = {vga_r, vga_g, vga_b};
    if (prev_x >= 64 && prev_x < 576 && prev_y >= 48 && prev_y < 432 && (prev_x - 64) % 16 == 8 && (prev_y - 48) % 12 == 6) begin
      if ({vga_r, vga_g, vga_b} == 3'b001) n_timebase++;
      if ({vga_r, vga_g, vga_b} == 3'b010 && (prev_x - 64) / 16 != cur_col) n_stored++;
    end
    if (prev_y < 16 && prev_x < 640 && {vga_r, vga_g, vga_b} == 3'b101) n_ovl++;
    if (prev_x == 0 && prev_y == 480) check_picture();
    if (prev_x == 0 && prev_y == 490) begin frame++; cur_col = int'(azimuth[8:4]); end
    prev_x = px; prev_y = py;
  end

  function automatic logic [2:0] want_cell(int c, int r);
    bit a_col, b_col;
    a_col = (c == 3) && (r == 8 || r == 20);
    b_col = (c == 10) && (r == 12);
    if (frame == 4) begin
      if (a_col) return 3'b010;
      return (c == 3) ? 3'b001 : 3'b111;
    end
    if (a_col || b_col) return 3'b010;
    return (c == 10) ? 3'b001 : 3'b111;
  endfunction

  task automatic check_picture();
    int bad;
    if (frame != 4 && frame != 9) return;
    bad = 0;
    for (int c = 0; c < 32; c++) for (int r = 0; r < 32; r++) begin
      checks++;
      if (img[c][r] != want_cell(c, r)) begin
        failures++; bad++;
        if (bad < 6) $display("frame %0d cell (az %0d, range %0d): %b want %b", frame, c, r, img[c][r], want_cell(c, r));
      end
    end
    $display("frame %0d picture checked, %0d cells wrong", frame, bad);
  endtask

  task automatic need(input int cnt, input string what);
    checks++;
    if (cnt == 0) begin failures++; $display("never happened: %s", what); end
    else $display("%-28s %0d", what, cnt);
  endtask

  initial begin
    repeat (5) @(posedge clk); rst_n <= 1'b1;
    wait (frame == 5 && pix_y == 10'd485);
    scene = 1;
    azimuth = 9'd167;                       // column 10
    wait (frame == 9 && pix_y == 10'd481);
    repeat (10) @(posedge clk);
    need(n_sweeps, "sweep triggers");
    need(n_fft, "FFT frames");
    need(n_det, "detections written");
    need(n_reject, "echoes below threshold");
    need(n_mirror, "mirror bins dropped");
    need(n_swaps, "buffer bank swaps");
    need(n_timebase, "time base cells");
    need(n_stored, "stored target cells");
    need(n_ovl, "annotation pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (9_500_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
