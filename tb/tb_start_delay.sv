// tb_start_delay: feeds a random trigger pattern at the sampling strobe and
// checks that the start output repeats it one strobe later (the document's
// one sampling period), and three strobes later for a deeper instance.
module tb_start_delay;
  logic clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0, trig = 1'b0;
  logic st1, st3;
  int checks = 0, failures = 0;
  logic hist [$];

  always #10 clk = ~clk;

  start_delay                    dut1 (.clk, .rst_n, .sample_en, .trig_in(trig), .start_out(st1));
  start_delay #(.DELAY_SAMPLES(3)) dut3 (.clk, .rst_n, .sample_en, .trig_in(trig), .start_out(st3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    checks++; if (st1 !== 1'b0 || st3 !== 1'b0) begin failures++; $display("not cleared by reset"); end
    for (int i = 0; i < 400; i++) begin
      trig = ($urandom_range(0, 3) == 0);
      hist.push_back(trig);
      sample_en = 1'b1;
      @(posedge clk); #1;
      sample_en = 1'b0;
      if (i >= 0) begin
        checks++;
        if (st1 !== hist[i]) begin failures++; $display("strobe %0d: start=%0b want %0b", i, st1, hist[i]); end
      end
      if (i >= 2) begin
        checks++;
        if (st3 !== hist[i-2]) begin failures++; $display("strobe %0d: start3=%0b want %0b", i, st3, hist[i-2]); end
      end
      trig = ~trig;   // must not matter between strobes
      repeat (2) @(posedge clk); #1;
      checks++;
      if (st1 !== hist[i]) begin failures++; $display("start changed between strobes"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
