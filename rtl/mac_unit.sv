// Multiply-and-accumulate block.
//
// While en is high, each clock the two Q15.16 inputs are captured in the
// input registers (INP1, INP2); one clock later their 64-bit product (Q31.32)
// is added to the accumulator. reset clears the accumulator synchronously.
// While en is low nothing is multiplied and the accumulator is held; the
// fixed-point conversion then drives the accumulated value onto the output
// pins: the sum is divided by 2^AVG_SHIFT (the 1/N of the sample averages
// E[X^2], E[XY], E[Y^2], with N = 4096), brought back to Q15.16 by
// dropping 16 fraction bits, and saturated to 32 bits.
//
// Timing: one product per clock; out holds the final sum two clocks after
// the last clock with en high, and keeps it until the next accumulation.
//
// Input and output widths, the registers, the reset and the enable follow
// the document; the accumulator width, the division by N inside the
// conversion and the saturation are this design's choices.
module mac_unit
  import cfd_pkg::*;
#(
  parameter int unsigned ACC_W     = 80,   // accumulator width (Q.32)
  parameter int unsigned AVG_SHIFT = 12    // log2 of the number of terms averaged
) (
  input  logic clk,
  input  logic reset,
  input  logic en,
  input  q_t   inp1,
  input  q_t   inp2,
  output q_t   out
);

  q_t                      inp1_q, inp2_q;
  logic                    en_q;
  logic signed [ACC_W-1:0] acc;
  logic signed [2*QW-1:0]  prod;
  logic signed [ACC_W-1:0] scaled;

  localparam logic signed [ACC_W-1:0] QMAX = ACC_W'(64'sd2147483647);
  localparam logic signed [ACC_W-1:0] QMIN = -ACC_W'(64'sd2147483648);

  assign prod   = inp1_q * inp2_q;
  assign scaled = acc >>> (QF + AVG_SHIFT);

  always_ff @(posedge clk) begin
    if (reset) begin
      inp1_q <= '0;
      inp2_q <= '0;
      en_q   <= 1'b0;
      acc    <= '0;
      out    <= '0;
    end else begin
      en_q <= en;
      if (en) begin
        inp1_q <= inp1;
        inp2_q <= inp2;
      end
      if (en_q) acc <= acc + ACC_W'(prod);
      if (!en_q) begin
        if (scaled > QMAX)      out <= QMAX[QW-1:0];
        else if (scaled < QMIN) out <= QMIN[QW-1:0];
        else                    out <= scaled[QW-1:0];
      end
    end
  end

endmodule
