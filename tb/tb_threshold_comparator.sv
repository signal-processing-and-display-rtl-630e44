// tb_threshold_comparator: checks detect = (mag > thr*16) for random values
// and for magnitudes just at and just around the scaled threshold.
module tb_threshold_comparator;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid, detect;
  logic [16:0] mag = '0;
  logic [7:0] thr = '0;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  threshold_comparator dut (.clk, .rst_n, .in_valid, .mag, .thr, .out_valid, .detect);

  task automatic one(input int m, input int t);
    @(posedge clk); mag <= 17'(m); thr <= 8'(t); in_valid <= 1'b1;
    @(posedge clk); in_valid <= 1'b0;
    #1;
    checks++;
    if (!out_valid || detect != (m > t * 16)) begin failures++; $display("mag %0d thr %0d detect %0b", m, t, detect); end
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    for (int i = 0; i < 100; i++) begin
      t = $urandom_range(0, 255);
      one(t * 16, t); one(t * 16 + 1, t); if (t > 0) one(t * 16 - 1, t);
      one($urandom_range(0, 131071), t);
    end
    one(131071, 255); one(0, 0);
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
