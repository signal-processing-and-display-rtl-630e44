// tb_signal_processor: feeds the signal processor a beat signal made of two
// bin-aligned tones (bin 10 strong, bin 25 weak) in the ADC's offset-binary
// code, with a short sampling period (40 clocks) and sweep (300 samples) to
// keep the run small. For two sweeps it checks the control timing (trigger
// period, start one sampling period after the trigger), that all 128 bins
// come out in order one per sampling period, each magnitude against a
// floating-point DFT of the samples the FFT took, and the detections against
// the switch threshold (40, i.e. magnitude 640), and that each result comes
// 21 clocks after its bin leaves the FFT.
module tb_signal_processor;
  localparam int SD = 40, SW = 300, N = 128, THR = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] adc_data = 6'd32;
  logic [7:0] threshold = 8'(THR);
  logic sample_en, vco_trig, fft_start, fft_busy, res_valid, res_detect;
  logic [6:0] res_bin;
  logic [16:0] res_mag;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  signal_processor #(.SAMPLE_DIV(SD), .SWEEP_SAMPLES(SW)) dut (
    .clk, .rst_n, .adc_data, .threshold, .sample_en, .vco_trig, .fft_start, .fft_busy,
    .res_valid, .res_bin, .res_mag, .res_detect);

  function automatic logic [5:0] adc(int n);
    real v;
    v = 31.5 + 20.0 * $sin(2.0 * 3.141592653589793 * 10 * n / N + 0.3)
             + 6.0 * $cos(2.0 * 3.141592653589793 * 25 * n / N);
    if (v < 0.0) v = 0.0;
    if (v > 63.0) v = 63.0;
    return 6'($rtoi($floor(v + 0.5)));
  endfunction

  int cyc = 0, n = 0;
  int taken [N];
  int n_taken = 0, collecting = 0;
  int t_bin = 0;
  int trig_cyc = -1, trig_prev = 0, start_cyc = -1, sweeps = 0;
  logic trig_q = 1'b0, start_q = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sample_en) begin
      // record exactly what the FFT loads on this strobe
      if (collecting == 0 && fft_start && !fft_busy) begin collecting = 1; n_taken = 0; end
      if (collecting == 1) begin
        taken[n_taken] = int'(adc_data) - 32;   // offset binary -> signed
        n_taken++;
        if (n_taken == N) collecting = 2;
      end
      n = n + 1;
      adc_data <= adc(n);
    end
    if (rst_n && dut.fft_valid) t_bin = cyc;
    if (rst_n && res_valid) begin
      // magnitude path latency: squarer 1 + adder 1 + square root 18 + comparator 1
      checks++;
      if (cyc - t_bin != 21) begin failures++; $display("result %0d clocks after its bin", cyc - t_bin); end
    end
    trig_q <= vco_trig; start_q <= fft_start;
    if (rst_n && vco_trig && !trig_q) begin
      if (trig_cyc >= 0) begin
        checks++;
        if (cyc - trig_cyc != SW * SD) begin failures++; $display("trigger period %0d", cyc - trig_cyc); end
      end
      trig_cyc = cyc;
    end
    if (rst_n && fft_start && !start_q) begin
      checks++;
      if (cyc - trig_cyc != SD) begin failures++; $display("start %0d cycles after trigger", cyc - trig_cyc); end
    end
  end

  initial begin
    int k, prev, dets;
    real re, im, m;
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    for (int s = 0; s < 2; s++) begin
      wait (collecting == 2);
      k = 0; prev = 0; dets = 0;
      while (k < N) begin
        @(posedge clk); #1;
        if (res_valid) begin
          checks++;
          if (res_bin != 7'(k)) begin failures++; $display("bin %0d got %0d", k, res_bin); end
          if (k > 0) begin
            checks++;
            if (cyc - prev != SD) begin failures++; $display("result spacing %0d", cyc - prev); end
          end
          prev = cyc;
          re = 0.0; im = 0.0;
          for (int i = 0; i < N; i++) begin
            re += taken[i] * $cos(2.0 * 3.141592653589793 * k * i / N);
            im -= taken[i] * $sin(2.0 * 3.141592653589793 * k * i / N);
          end
          m = $sqrt(re * re + im * im);
          checks++;
          if (res_mag > m + 6.0 || res_mag < m - 6.0) begin failures++; $display("bin %0d mag %0d want %0.1f", k, res_mag, m); end
          if (m > THR * 16 + 6.0 || m < THR * 16 - 6.0) begin
            checks++;
            if (res_detect != (m > THR * 16)) begin failures++; $display("bin %0d detect %0b mag %0.1f", k, res_detect, m); end
          end
          if (res_detect) dets++;
          k++;
        end
      end
      checks++;
      if (dets != 2) begin failures++; $display("sweep %0d: %0d detections, want 2 (bins 10 and 118)", s, dets); end
      collecting = 0;
      sweeps++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3 * SW * SD) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
