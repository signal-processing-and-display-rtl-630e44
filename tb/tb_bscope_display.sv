// tb_bscope_display: drives the display program with a real raster (the VGA
// timing and cell decoder), a range buffer model and an annotation block in
// the top-left corner, and checks the colour and syncs of every pixel of
// three frames against a pixel model of the B-scope:
//   frame 1: antenna at column 5, profile A  -> column 5 shows A live;
//   frame 2: antenna at column 9, profile B  -> column 9 shows B, column 5
//            keeps A from the cell memory;
//   frame 3: antenna back at column 5, profile C -> C replaces A there.
module tb_bscope_display;
  import radar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, pix_en = 1'b0;
  logic [9:0] x, y;
  logic video_on, hs_n, vs_n, in_plot, on_grid;
  logic [4:0] col, row;
  logic buf_bit = 1'b0, ovl_on = 1'b0;
  rgb_t ovl_rgb = '{r: 1'b1, g: 1'b0, b: 1'b1};
  logic [8:0] azimuth;
  logic vga_r, vga_g, vga_b, vga_hs, vga_vs;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  always @(posedge clk) pix_en <= rst_n && !pix_en;

  vga_timing       u_t (.clk, .rst_n, .pix_en, .x, .y, .video_on, .hs_n, .vs_n);
  display_addr_gen u_a (.x, .y, .in_plot, .on_grid, .col, .row);
  bscope_display   dut (.clk, .rst_n, .pix_en, .video_on, .hs_n, .vs_n, .in_plot, .on_grid,
                        .col, .row, .buf_bit, .azimuth, .ovl_on, .ovl_rgb,
                        .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  // range buffer and annotation memory models: one pixel period of latency
  logic prof [32];
  always @(posedge clk) if (pix_en) begin
    buf_bit <= prof[row];
    ovl_on  <= (y < 10'd16) && (x < 10'd100);
  end

  // ---- pixel model -----------------------------------------------------
  logic mem [32][32];       // [column][range row]
  int   cur_col = 0;        // column latched at the last vsync (0 after reset)
  logic [2:0] want;
  int   px, py, frames = 0, greens = 0, blues = 0, ovls = 0, kept = 0;

  function automatic logic [2:0] colour(int xx, int yy);
    int c, r;
    logic t;
    if (!(xx < 640 && yy < 480)) return 3'b000;
    if (yy < 16 && xx < 100) return 3'b101;
    if (xx >= 64 && xx <= 576 && yy >= 48 && yy <= 432) begin
      if (xx == 576 || yy == 432 || (xx - 64) % 16 == 0 || (yy - 48) % 12 == 0) return 3'b100;
      c = (xx - 64) / 16; r = 31 - (yy - 48) / 12;
      t = (c == cur_col) ? prof[r] : mem[c][r];
      if (t) return 3'b010;
      return (c == cur_col) ? 3'b001 : 3'b111;
    end
    return 3'b001;
  endfunction

  int prev_x = 0, prev_y = 0;
  logic checking = 1'b0;
  always @(posedge clk) if (pix_en) begin
    px = int'(x); py = int'(y);
    #1;
    // outputs now show the position taken at the previous strobe
    if (checking) begin
      want = colour(prev_x, prev_y);
      checks++;
      if ({vga_r, vga_g, vga_b} != want) begin
        failures++;
        if (failures < 10) $display("frame %0d (%0d,%0d): rgb %b want %b", frames, prev_x, prev_y, {vga_r, vga_g, vga_b}, want);
      end
      if (want == 3'b010) greens++;
      if (want == 3'b010 && (prev_x - 64) / 16 != cur_col) kept++;
      if (want == 3'b001 && prev_x >= 64 && prev_x < 576 && prev_y >= 48 && prev_y < 432) blues++;
      if (want == 3'b101) ovls++;
      checks++;
      if (vga_hs != !(prev_x >= 656 && prev_x < 752) || vga_vs != !(prev_y >= 490 && prev_y < 492)) begin
        failures++; if (failures < 10) $display("(%0d,%0d): syncs %b%b", prev_x, prev_y, vga_hs, vga_vs);
      end
    end
    // frame bookkeeping on the model's side
    if (prev_x == 0 && prev_y == 480 && cur_col >= 0)
      for (int r = 0; r < 32; r++) mem[cur_col][r] = prof[r];
    if (prev_x == 0 && prev_y == 490) begin
      cur_col = int'(azimuth[8:4]);
      checking = 1'b1;
    end
    prev_x = px; prev_y = py;
  end

  task automatic set_scene(input int column, input int seed);
    azimuth = 9'((column << 4) | (seed & 15));
    for (int r = 0; r < 32; r++) prof[r] = ((r * 7 + seed) % 5 == 0);
  endtask

  initial begin
    for (int c = 0; c < 32; c++) for (int r = 0; r < 32; r++) mem[c][r] = 1'b0;
    set_scene(5, 1);
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    // frames: wait for line 485 (after the visible part, before vsync)
    for (int f = 0; f < 4; f++) begin
      wait (y == 10'd485);
      case (f)
        1: set_scene(9, 3);
        2: set_scene(5, 2);
        default: ;
      endcase
      wait (y == 10'd486);
      if (checking) frames++;
    end
    checks++; if (greens == 0) begin failures++; $display("no target drawn"); end
    checks++; if (kept == 0) begin failures++; $display("no stored target drawn"); end
    checks++; if (blues == 0) begin failures++; $display("no time base drawn"); end
    checks++; if (ovls == 0) begin failures++; $display("no annotation drawn"); end
    $display("frames %0d, target pixels %0d (stored %0d), time base pixels %0d", frames, greens, kept, blues);
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
