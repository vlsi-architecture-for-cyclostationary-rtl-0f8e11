// Threshold register and comparator that make the final decision.
//
// The threshold is a 64-bit Q47.16 register, written through thr_we /
// thr_din and reset to THRESH_DEFAULT. When a test statistic arrives
// (stat_valid) it is compared with the register and decision is set to
// "primary user present" if the statistic is larger; decision_valid pulses
// one clock later with the result, which is held until the next statistic.
//
// The default 301804 is 4.6052 in Q47.16: the chi-square inverse
// distribution at 1 - P_FA with P_FA = 0.1 and two degrees of freedom (the
// statistic is built from a two-element vector), -2 ln(0.1). The false-alarm
// probability and the reconfigurable register are the document's; the
// degrees of freedom, the format and the interface are this design's
// choices.
module threshold_cmp #(
  parameter logic signed [63:0] THRESH_DEFAULT = 64'sd301804
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               thr_we,
  input  logic signed [63:0] thr_din,
  input  logic               stat_valid,
  input  logic signed [63:0] stat,
  output logic signed [63:0] threshold,
  output logic               decision,
  output logic               decision_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      threshold      <= THRESH_DEFAULT;
      decision       <= 1'b0;
      decision_valid <= 1'b0;
    end else begin
      if (thr_we) threshold <= thr_din;
      decision_valid <= stat_valid;
      if (stat_valid) decision <= stat > threshold;
    end
  end

endmodule
