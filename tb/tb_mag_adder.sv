// tb_mag_adder: random and full-scale operands; checks sum = a + b with the
// carry kept, one clock after in_valid.
module tb_mag_adder;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0;
  logic [32:0] sum;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  mag_adder dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .sum);

  task automatic one(input longint va, input longint vb);
    @(posedge clk); a <= 32'(va); b <= 32'(vb); in_valid <= 1'b1;
    @(posedge clk); in_valid <= 1'b0; a <= $urandom; b <= $urandom;
    #1;
    checks++;
    if (!out_valid || sum != 33'(va + vb)) begin failures++; $display("%0d+%0d = %0d", va, vb, sum); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1'b1;
    one(0, 0); one(32'hFFFF_FFFF, 32'hFFFF_FFFF); one(32'h8000_0000, 32'h8000_0000); one(1, 2);
    repeat (300) one(longint'($urandom), longint'($urandom));
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
