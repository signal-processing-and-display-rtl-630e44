// sweep_sync: synchronization block that triggers the VCO control circuit at
// the start of every sawtooth frequency sweep.
//
// It counts sampling periods (strobes of `sample_en`, 50 kHz) modulo
// SWEEP_SAMPLES. The sweep period of 16.7 ms is 835 sampling periods of 20 us.
// `vco_trig` rises on the strobe that starts a sweep and stays high for
// TRIG_SAMPLES sampling periods. The period follows the document's control
// timing; the one-period pulse width and the first trigger coming on the first
// strobe after reset are this design's choices.
module sweep_sync #(
  parameter int unsigned SWEEP_SAMPLES = 835,
  parameter int unsigned TRIG_SAMPLES  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  output logic vco_trig
);
  localparam int unsigned CW = $clog2(SWEEP_SAMPLES);
  logic [CW-1:0] cnt;   // index of the next sampling period within the sweep

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      vco_trig <= 1'b0;
    end else if (sample_en) begin
      vco_trig <= (cnt < CW'(TRIG_SAMPLES));
      if (cnt == CW'(SWEEP_SAMPLES - 1)) cnt <= '0;
      else cnt <= cnt + 1'b1;
    end
  end
endmodule
