// threshold_comparator: target present/absent decision.
//
// Compares an FFT bin magnitude with the fixed threshold set by hand on the
// board's switches. `detect` = (mag > thr * 2^THR_SHIFT): the THR_W switch
// bits are scaled so that they span the magnitudes a 6-bit input can give
// (a full-scale tone reaches about 2000). The switch width, the scaling and
// the strict comparison are this design's choices. One register stage:
// `detect` and `out_valid` follow `in_valid` by one clk cycle.
module threshold_comparator #(
  parameter int unsigned MAG_W     = 17,
  parameter int unsigned THR_W     = 8,
  parameter int unsigned THR_SHIFT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [MAG_W-1:0] mag,
  input  logic [THR_W-1:0] thr,
  output logic             out_valid,
  output logic             detect
);
  localparam int unsigned CMP_W = (MAG_W > THR_W + THR_SHIFT) ? MAG_W : THR_W + THR_SHIFT;
  logic [CMP_W-1:0] thr_scaled;
  assign thr_scaled = CMP_W'(thr) << THR_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      detect    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) detect <= (CMP_W'(mag) > thr_scaled);
    end
  end
endmodule
