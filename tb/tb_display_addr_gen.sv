// tb_display_addr_gen: walks every pixel of the 800x525 raster and compares
// the cell decode with a model that counts cells while walking (a column
// counter stepped every 16 pixels and a row counter every 12 lines from the
// grid's corner at (64,48)), so it shares no division with the design.
module tb_display_addr_gen;
  logic [9:0] x, y;
  logic in_plot, on_grid;
  logic [4:0] col, row;
  int checks = 0, failures = 0;
  display_addr_gen dut (.x, .y, .in_plot, .on_grid, .col, .row);

  initial begin
    int c, sx, r, sy;
    bit e_plot, e_grid;
    r = 0; sy = 0;
    for (int yy = 0; yy < 525; yy++) begin
      if (yy > 48) begin sy++; if (sy == 12) begin sy = 0; r++; end end
      c = 0; sx = 0;
      for (int xx = 0; xx < 800; xx++) begin
        if (xx > 64) begin sx++; if (sx == 16) begin sx = 0; c++; end end
        x = 10'(xx); y = 10'(yy);
        #1;
        e_plot = (xx >= 64 && xx <= 64 + 512 && yy >= 48 && yy <= 48 + 384);
        e_grid = (sx == 0) || (sy == 0);
        checks++;
        if (in_plot != e_plot) begin failures++; if (failures < 10) $display("(%0d,%0d) in_plot %0b", xx, yy, in_plot); end
        if (e_plot) begin
          checks++;
          if (on_grid != e_grid) begin failures++; if (failures < 10) $display("(%0d,%0d) on_grid %0b", xx, yy, on_grid); end
          if (!e_grid) begin
            checks++;
            if (col != 5'(c) || row != 5'(31 - r)) begin
              failures++; if (failures < 10) $display("(%0d,%0d) col %0d row %0d want %0d %0d", xx, yy, col, row, c, 31 - r);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
