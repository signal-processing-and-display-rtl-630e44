// tb_pingpong_buffer: writes a random detection profile into the write bank,
// pulses vertical sync to swap the banks, and reads the profile back through
// the display port while the next profile is being written into the other
// RAM. Checks the R/W select toggles once per vsync pulse, that reads always
// return the previous sweep's data, and that bins >= 64 are not stored.
module tb_pingpong_buffer;
  localparam int D = 64;
  logic clk = 1'b0, rst_n = 1'b0, vs_n = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [6:0] wr_addr = '0;
  logic [5:0] rd_addr = '0;
  logic wr_data = 1'b0, rd_data, bank;
  int checks = 0, failures = 0;
  logic prof [4][D];
  always #10 clk = ~clk;

  pingpong_buffer dut (.clk, .rst_n, .vs_n, .wr_en, .wr_addr, .wr_data,
                       .rd_en, .rd_addr, .rd_data, .bank);

  task automatic vsync();
    @(posedge clk); vs_n <= 1'b0;
    repeat (4) @(posedge clk);
    vs_n <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  // write profile p (bins 0..127, bins >= 64 carry the inverse pattern) while
  // reading back profile q, interleaved as the two rates would be
  task automatic sweep(input int p, input int q);
    for (int k = 0; k < 128; k++) begin
      @(posedge clk);
      wr_en <= 1'b1; wr_addr <= 7'(k);
      wr_data <= (k < D) ? prof[p][k] : !prof[p][k - D];
      @(posedge clk); wr_en <= 1'b0;
      if (q >= 0 && k < D) begin
        rd_en <= 1'b1; rd_addr <= 6'(k);
        @(posedge clk); rd_en <= 1'b0;
        #1;
        checks++;
        if (rd_data !== prof[q][k]) begin failures++; $display("read bin %0d = %0b want %0b (profile %0d)", k, rd_data, prof[q][k], q); end
      end
    end
  endtask

  initial begin
    logic b0;
    for (int p = 0; p < 4; p++) for (int k = 0; k < D; k++) prof[p][k] = $urandom_range(0, 1);
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    @(posedge clk); #1;
    b0 = bank;
    sweep(0, -1);
    vsync(); #1;
    checks++; if (bank == b0) begin failures++; $display("no swap"); end
    sweep(1, 0);          // read profile 0 while writing profile 1
    vsync(); #1;
    checks++; if (bank != b0) begin failures++; $display("no swap back"); end
    sweep(2, 1);
    vsync();
    sweep(3, 2);
    vsync();
    // no writes this frame: the reader still sees profile 3
    sweep(3, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
