// isqrt: the square root of the magnitude path, root = floor(sqrt(x)).
//
// The FFT delivers one bin per 20 us sampling period, so the root can be
// found one bit per clk cycle with the digit-by-digit (non-restoring, radix-4)
// method: a W-bit radicand (W even) takes W/2 cycles. `in_valid` loads `x`
// and starts; W/2 cycles later `out_valid` pulses for one cycle with `root`
// (W/2 bits), which then holds until the next result. An `in_valid` while a
// root is being found restarts it. The method is this design's choice; the
// document only names the square-root block.
module isqrt #(
  parameter int unsigned W = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     x,
  output logic             out_valid,
  output logic [W/2-1:0]   root
);
  localparam int unsigned HW = W / 2;
  localparam int unsigned CW = $clog2(HW + 1);

  logic [W-1:0]  op;     // remaining radicand
  logic [W-1:0]  res;    // partial root, scaled
  logic [W-1:0]  one;    // current bit weight (power of four)
  logic [CW-1:0] left;   // iterations left
  logic          run;
  logic [W-1:0]  trial;

  assign trial = res + one;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op        <= '0;
      res       <= '0;
      one       <= '0;
      left      <= '0;
      run       <= 1'b0;
      out_valid <= 1'b0;
      root      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        op   <= x;
        res  <= '0;
        one  <= W'(1) << (W - 2);
        left <= CW'(HW);
        run  <= 1'b1;
      end else if (run) begin
        if (op >= trial) begin
          op  <= op - trial;
          res <= (res >> 1) + one;
        end else begin
          res <= res >> 1;
        end
        one  <= one >> 2;
        left <= left - 1'b1;
        if (left == CW'(1)) begin
          run       <= 1'b0;
          out_valid <= 1'b1;
          root      <= (op >= trial) ? HW'((res >> 1) + one) : HW'(res >> 1);
        end
      end
    end
  end
endmodule
