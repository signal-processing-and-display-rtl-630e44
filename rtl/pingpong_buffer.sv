// pingpong_buffer: buffering between the 50 kHz signal processor and the
// 25 MHz display.
//
// Two RAMs take turns. The R/W select (`bank`) is the vertical sync divided
// by two: it toggles at the start of every vertical sync pulse, i.e. once per
// displayed frame (16.7 ms, the length of one sweep). While bank = 0, RAM-1
// is written and RAM-2 is read; while bank = 1, the other way round. An
// address multiplexer gives the RAM being written the FFT's bin index and the
// sampling-rate write strobe, and the RAM being read the display's address and
// the pixel strobe; an output multiplexer passes the RAM being read. So while
// one sweep's detections are stored in range order, the previous sweep's are
// shown. The structure is the document's. This design's choices: both RAMs
// run on the one 50 MHz clk with enables; bins at or above DEPTH (the mirror
// half of a real signal's spectrum) are not stored; the toggle is taken on
// the falling (active) edge of the active-low `vs_n`, found by sampling it on
// every clk. Timing: rd_data is valid the clk after an `rd_en` with rd_addr
// and holds until the next rd_en.
module pingpong_buffer #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     vs_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH):0]   wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  output logic                     bank
);
  localparam int unsigned AW = $clog2(DEPTH);

  // divide-by-two of the vertical sync
  logic vs_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vs_q <= 1'b1;
      bank <= 1'b0;
    end else begin
      vs_q <= vs_n;
      if (vs_q && !vs_n) bank <= ~bank;
    end
  end

  logic wr_ok;
  assign wr_ok = wr_en && (wr_addr < (AW+1)'(DEPTH));

  // address / enable multiplexer
  logic          en1, en2;
  logic [AW-1:0] addr1, addr2;
  logic [W-1:0]  q1, q2;
  always_comb begin
    if (!bank) begin
      en1 = wr_ok;  addr1 = wr_addr[AW-1:0];
      en2 = rd_en;  addr2 = rd_addr;
    end else begin
      en1 = rd_en;  addr1 = rd_addr;
      en2 = wr_ok;  addr2 = wr_addr[AW-1:0];
    end
  end

  sp_ram #(.DEPTH(DEPTH), .W(W)) u_ram1 (
    .clk, .en(en1), .we(!bank), .addr(addr1), .wdata(wr_data), .rdata(q1)
  );
  sp_ram #(.DEPTH(DEPTH), .W(W)) u_ram2 (
    .clk, .en(en2), .we(bank), .addr(addr2), .wdata(wr_data), .rdata(q2)
  );

  // output multiplexer follows the bank that was read
  logic rd_sel;
  always_ff @(posedge clk) begin
    if (!rst_n) rd_sel <= 1'b0;
    else if (rd_en) rd_sel <= bank;
  end
  assign rd_data = rd_sel ? q1 : q2;
endmodule
