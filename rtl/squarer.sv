// squarer: one of the two multipliers of the magnitude path.
//
// Each multiplier takes the same FFT output part on both inputs, so it
// computes x*x: the real part in one instance, the imaginary part in the
// other. The square of a signed W-bit value is non-negative and fits in 2*W
// unsigned bits. One register stage: `p` and `out_valid` follow `in_valid` by
// one clk cycle. The register stage is this design's choice.
module squarer #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic [2*W-1:0]      p
);
  logic signed [2*W-1:0] sq;
  assign sq = x * x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= unsigned'(sq);
    end
  end
endmodule
