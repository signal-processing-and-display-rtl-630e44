// tb_fft_core: runs three 128-point frames through the FFT (random samples,
// a single bin-aligned tone, and a mix) and compares every bin with a
// floating-point DFT of the same samples. Also checks the timing the radar
// relies on: bins leave in order 0..127, one per sampling strobe, starting at
// the first strobe after the 448-cycle butterfly phase; a start pulse during
// a frame is ignored.
module tb_fft_core;
  localparam int N = 128, IN_W = 6, DW = 16, SP = 8;   // strobe every SP clocks
  logic clk = 1'b0, rst_n = 1'b0, sample_en = 1'b0, start = 1'b0;
  logic signed [IN_W-1:0] din_re, din_im;
  logic busy, out_valid;
  logic [6:0] out_idx;
  logic signed [DW-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  fft_core dut (.clk, .rst_n, .sample_en, .start, .din_re, .din_im,
                .busy, .out_valid, .out_idx, .out_re, .out_im);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sample_en <= ((cyc % SP) == SP - 1);
  end

  int xr [N];
  int xi [N];
  real max_err = 0.0;

  task automatic run_frame(input int kind);
    real re, im, e;
    int got_re [N], got_im [N];
    int n_out, last_load_cyc, first_out_cyc, prev_out_cyc;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin xr[n] = $urandom_range(0, 63) - 32; xi[n] = $urandom_range(0, 63) - 32; end
        1: begin xr[n] = $rtoi($floor(30.0 * $cos(2.0 * 3.141592653589793 * 9 * n / N) + 0.5)); xi[n] = 0; end
        default: begin
          xr[n] = $rtoi($floor(18.0 * $sin(2.0 * 3.141592653589793 * 21 * n / N) +
                               10.0 * $cos(2.0 * 3.141592653589793 * 50 * n / N) + 0.5));
          xi[n] = 0;
        end
      endcase
    end
    // present sample n before strobe n; start is high for one sampling period
    @(posedge clk iff sample_en);   // align
    din_re <= IN_W'(xr[0]); din_im <= IN_W'(xi[0]); start <= 1'b1;
    for (int n = 1; n < N; n++) begin
      @(posedge clk iff sample_en);
      start  <= (n == 40);          // stray start during the frame: ignored
      din_re <= IN_W'(xr[n]); din_im <= IN_W'(xi[n]);
    end
    @(posedge clk iff sample_en);   // last sample taken here
    last_load_cyc = cyc;
    start <= 1'b0;
    n_out = 0; prev_out_cyc = 0; first_out_cyc = 0;
    while (n_out < N) begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        if (out_idx != 7'(n_out)) begin failures++; $display("bin order: got %0d want %0d", out_idx, n_out); end
        if (n_out == 0) first_out_cyc = cyc;
        else begin
          checks++;
          if (cyc - prev_out_cyc != SP) begin failures++; $display("bin spacing %0d", cyc - prev_out_cyc); end
        end
        prev_out_cyc = cyc;
        got_re[n_out] = out_re; got_im[n_out] = out_im;
        n_out++;
      end
    end
    // first bin: first strobe after 448 butterfly cycles
    checks++;
    // butterflies end 448 cycles after the last sample; the next strobe
    // (SP later) reads bin 0, visible one cycle after that strobe
    if (first_out_cyc - last_load_cyc != 448 + SP + 1) begin
      failures++; $display("latency %0d cycles", first_out_cyc - last_load_cyc);
    end
    for (int k = 0; k < N; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += xr[n] * $cos(2.0 * 3.141592653589793 * k * n / N) + xi[n] * $sin(2.0 * 3.141592653589793 * k * n / N);
        im += xi[n] * $cos(2.0 * 3.141592653589793 * k * n / N) - xr[n] * $sin(2.0 * 3.141592653589793 * k * n / N);
      end
      e = (got_re[k] - re) * (got_re[k] - re) + (got_im[k] - im) * (got_im[k] - im);
      e = $sqrt(e);
      if (e > max_err) max_err = e;
      checks++;
      if (e > 8.0) begin
        failures++; $display("frame %0d bin %0d: got (%0d,%0d) want (%0.1f,%0.1f)", kind, k, got_re[k], got_im[k], re, im);
      end
    end
    @(posedge clk); #1;
    checks++; if (busy) begin failures++; $display("busy after last bin"); end
  endtask

  initial begin
    din_re = '0; din_im = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    checks++; if (busy || out_valid) begin failures++; $display("not idle after reset"); end
    run_frame(0);
    run_frame(1);
    run_frame(2);
    $display("largest bin error %0.2f", max_err);
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
