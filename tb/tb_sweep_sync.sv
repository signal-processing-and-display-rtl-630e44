// tb_sweep_sync: drives the 50 kHz strobe (here every 3 clocks) and checks
// that the VCO trigger rises every 835 sampling periods (16.7 ms), stays high
// for exactly one sampling period and comes first on the first strobe.
module tb_sweep_sync;
  logic clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0;
  logic vco_trig;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  sweep_sync dut (.clk, .rst_n, .sample_en, .vco_trig);

  int strobe = 0, rises = 0, last_rise = -1;
  logic prev = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4 * 835 + 10) begin
      @(posedge clk); sample_en <= 1'b1;
      @(posedge clk); sample_en <= 1'b0;
      #1;
      // after each strobe: trigger must be high exactly on strobes 0, 835, ...
      checks++;
      if (vco_trig !== ((strobe % 835) == 0)) begin
        failures++; $display("strobe %0d: vco_trig=%0b", strobe, vco_trig);
      end
      if (vco_trig && !prev) begin
        if (last_rise >= 0) begin
          checks++;
          if (strobe - last_rise != 835) begin failures++; $display("period %0d", strobe - last_rise); end
        end
        last_rise = strobe; rises++;
      end
      prev = vco_trig;
      @(posedge clk); #1;
      checks++;
      if (vco_trig !== prev) begin failures++; $display("trigger changed without strobe"); end
      strobe++;
    end
    checks++; if (rises != 5) begin failures++; $display("rises %0d", rises); end
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
