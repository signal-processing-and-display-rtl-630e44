// start_delay: delay block that makes the FFT start pulse from the sweep
// trigger.
//
// The echo from the farthest target (1200 m) arrives 8 us after the sweep
// starts; for margin the signal processing starts one whole sampling period
// (20 us) after the trigger. This block is a DELAY_SAMPLES-deep shift register
// advanced by the 50 kHz `sample_en` strobe, so `start_out` is `trig_in` seen
// DELAY_SAMPLES sampling periods later, with the same width.
module start_delay #(
  parameter int unsigned DELAY_SAMPLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  logic trig_in,
  output logic start_out
);
  logic [DELAY_SAMPLES-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) sr <= '0;
    else if (sample_en) sr <= DELAY_SAMPLES'({sr, trig_in});
  end

  assign start_out = sr[DELAY_SAMPLES-1];
endmodule
