// clk_divider: rate divider producing a one-cycle enable pulse every DIV
// clock cycles.
//
// The radar takes its 50 kHz sampling rate (DIV = 1000) and its 25 MHz VGA
// pixel rate (DIV = 2) from the 50 MHz board oscillator. Instead of making new
// clocks, this design keeps one clock and gives each slower part an enable:
// `tick` is high for one clk cycle out of every DIV. A counter runs from 0 to
// DIV-1; tick is asserted while it holds DIV-1, so the first tick after reset
// comes DIV cycles after reset is released. The rates are the document's; the
// enable style is this design's choice.
module clk_divider #(
  parameter int unsigned DIV = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == CW'(DIV - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == CW'(DIV - 1));
endmodule
