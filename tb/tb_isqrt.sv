// tb_isqrt: checks root*root <= x < (root+1)^2 for squares, their neighbours,
// the largest radicand and random values, and that the result comes exactly
// W/2 = 17 clocks after in_valid.
module tb_isqrt;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [33:0] x = '0;
  logic [16:0] root;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  isqrt dut (.clk, .rst_n, .in_valid, .x, .out_valid, .root);

  task automatic one(input longint v);
    int lat;
    longint r;
    @(posedge clk); x <= 34'(v); in_valid <= 1'b1;
    @(posedge clk); in_valid <= 1'b0; x <= '0;
    lat = 0;   // counted from the clock edge that takes in_valid
    #1;
    while (!out_valid && lat < 40) begin @(posedge clk); #1; lat++; end
    r = longint'(root);
    checks++;
    if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin failures++; $display("sqrt(%0d) = %0d", v, r); end
    checks++;
    if (lat != 17) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    longint s;
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    one(0); one(1); one(2); one(3); one(4); one(34'h3_FFFF_FFFF);
    one(longint'(2) * 32767 * 32767 + 1);
    for (int i = 0; i < 60; i++) begin
      s = longint'($urandom_range(0, 131071));
      one(s * s); one(s * s + 2 * s); if (s > 0) one(s * s - 1);
    end
    repeat (100) one({$urandom, $urandom} & 64'h3_FFFF_FFFF);
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
