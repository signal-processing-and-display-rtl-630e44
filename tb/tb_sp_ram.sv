// tb_sp_ram: random writes and reads against a reference array; checks the
// registered read-first behaviour and that nothing changes without en.
module tb_sp_ram;
  localparam int D = 64, W = 4;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [5:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;
  always #10 clk = ~clk;
  sp_ram #(.DEPTH(D), .W(W)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    logic [W-1:0] want, held;
    // fill every word first
    for (int i = 0; i < D; i++) begin
      @(posedge clk); en <= 1'b1; we <= 1'b1; addr <= 6'(i); wdata <= W'($urandom);
      ref_mem[i] = 'x;
    end
    @(posedge clk); en <= 1'b0; we <= 1'b0;
    #1;
    for (int i = 0; i < D; i++) ref_mem[i] = dut.mem[i];
    for (int i = 0; i < 600; i++) begin
      logic w;
      logic [W-1:0] d;
      int a;
      w = $urandom_range(0, 1);
      a = $urandom_range(0, D - 1);
      d = W'($urandom);
      @(posedge clk); en <= 1'b1; we <= w; addr <= 6'(a); wdata <= d;
      want = ref_mem[a];
      @(posedge clk); en <= 1'b0; we <= 1'b1; wdata <= W'($urandom);
      #1;
      if (w) ref_mem[a] = d;
      checks++;
      if (rdata != want) begin failures++; $display("addr %0d read %0h want %0h", a, rdata, want); end
      held = rdata;
      @(posedge clk); #1;
      checks++;
      if (rdata != held || dut.mem[a] != ref_mem[a]) begin failures++; $display("changed without en"); end
    end
    // written data reads back
    for (int i = 0; i < D; i++) begin
      @(posedge clk); en <= 1'b1; we <= 1'b1; addr <= 6'(i); wdata <= W'(i * 5);
    end
    for (int i = 0; i < D; i++) begin
      @(posedge clk); en <= 1'b1; we <= 1'b0; addr <= 6'(i);
      @(posedge clk); en <= 1'b0; #1;
      checks++;
      if (rdata != W'(i * 5)) begin failures++; $display("readback %0d: %0h", i, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
