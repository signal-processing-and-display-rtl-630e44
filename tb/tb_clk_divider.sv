// tb_clk_divider: checks that the divider's tick comes exactly once every DIV
// clock cycles, for the sampling divider (DIV = 1000) and the pixel divider
// (DIV = 2), and that the first tick comes DIV cycles after reset.
module tb_clk_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_s, tick_p;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  clk_divider                 dut_s (.clk, .rst_n, .tick(tick_s));
  clk_divider #(.DIV(2))      dut_p (.clk, .rst_n, .tick(tick_p));

  int cyc = 0, last_s = 0, last_p = 0, n_s = 0, n_p = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (cyc = 1; cyc <= 10500; cyc++) begin
      @(posedge clk); #1;
      if (tick_s) begin
        checks++;
        if (last_s != 0 && cyc - last_s != 1000) begin
          failures++; $display("sample tick at %0d, previous at %0d", cyc, last_s);
        end
        last_s = cyc; n_s++;
      end
      if (tick_p) begin
        checks++;
        if (last_p != 0 && cyc - last_p != 2) begin
          failures++; $display("pixel tick at %0d, previous at %0d", cyc, last_p);
        end
        last_p = cyc; n_p++;
      end
    end
    checks++; if (n_s != 10) begin failures++; $display("sample ticks %0d", n_s); end
    checks++; if (n_p != 5250) begin failures++; $display("pixel ticks %0d", n_p); end
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
