// tb_squarer: random and extreme signed operands; checks p = x*x one clock
// after in_valid, and that p holds while in_valid is low.
module tb_squarer;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [15:0] x = '0;
  logic [31:0] p;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  squarer dut (.clk, .rst_n, .in_valid, .x, .out_valid, .p);

  task automatic one(input int v);
    longint want;
    @(posedge clk); x <= 16'(v); in_valid <= 1'b1;
    @(posedge clk); in_valid <= 1'b0; x <= 16'($urandom);
    #1;
    want = longint'(v) * longint'(v);
    checks++;
    if (!out_valid || p != 32'(want)) begin failures++; $display("x=%0d p=%0d want %0d", v, p, want); end
    @(posedge clk); #1;
    checks++;
    if (out_valid || p != 32'(want)) begin failures++; $display("result not held"); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    one(0); one(1); one(-1); one(32767); one(-32768); one(-1234);
    repeat (300) one(int'($urandom_range(0, 65535)) - 32768);
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
