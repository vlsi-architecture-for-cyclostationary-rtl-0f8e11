// Frequency selector: picks the FFT output at the cyclic frequency alpha.
//
// The count register takes the 16-bit count value while reset is high, so
// it holds the output position of the wanted bin for the whole frame (the
// FFT delivers its bins in base-4 digit-reversed order, so this is the
// digit-reversed index of alpha). The counter counts the FFT outputs, one
// per clock with en high; when the equality comparator sees the count equal
// to the register, the 64-bit input is latched onto the output pins and
// found is raised. Both stay until the next reset.
//
// The counter, count register, comparator and 64-bit latch follow the
// document; loading the count register during reset and the found flag
// are this design's choices.
module freq_selector
  import cfd_pkg::*;
#(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          en,
  input  logic [CW-1:0] count_value,
  input  cplx_t         inp,
  output cplx_t         out,
  output logic          found
);

  logic [CW-1:0] count_reg;
  logic [CW-1:0] counter;
  logic          match;

  assign match = en && (counter == count_reg);

  always_ff @(posedge clk) begin
    if (reset) begin
      count_reg <= count_value;
      counter   <= '0;
      out       <= '0;
      found     <= 1'b0;
    end else if (en) begin
      counter <= counter + 1'b1;
      if (match) begin
        out   <= inp;
        found <= 1'b1;
      end
    end
  end

endmodule
