// sp_ram: single-port synchronous RAM (RAM-1 and RAM-2 of the ping-pong
// buffer).
//
// One address serves both writing and reading, as the buffer's address
// multiplexer hands each RAM either the FFT's write address or the display's
// read address. On a clk edge with `en` high: if `we`, mem[addr] <= wdata;
// rdata <= the old mem[addr] (read-first). rdata holds between enables. The
// RAM is not cleared by reset; like an FPGA block RAM it starts out all
// zero. The registered, read-first style is this design's choice.
module sp_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 1
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end
endmodule
