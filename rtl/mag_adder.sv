// mag_adder: the adder of the magnitude path.
//
// Adds the squared real and squared imaginary parts of an FFT bin, giving the
// squared magnitude. The sum keeps a carry bit (W+1 bits) so it never wraps.
// One register stage: `sum` and `out_valid` follow `in_valid` by one clk
// cycle, a choice of this design.
module mag_adder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic [W:0]   sum
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= {1'b0, a} + {1'b0, b};
    end
  end
endmodule
