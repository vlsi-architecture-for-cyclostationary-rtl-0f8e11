// Radix-4 decimation-in-frequency butterfly with twiddle multiplication,
// producing one of its four outputs per clock.
//
// For inputs a0..a3 (samples n, n+M/4, n+M/2, n+3M/4 of a block of M) and a
// selected output k, the unit forms
//     y_k = sum_{i=0..3} a_i * (-j)^(i*k)
// using the usual split s02 = a0+a2, d02 = a0-a2, s13 = a1+a3,
// d13 = a1-a3: y0 = s02+s13, y2 = s02-s13, y1 = d02 - j*d13,
// y3 = d02 + j*d13. The multiplications by +-j are swaps and negations, so
// the only real multiplier is the twiddle product y_k * W that follows.
//
// Timing: inputs are sampled when in_valid is high and en is high; the sum
// is registered together with the twiddle factor, and the twiddle product
// is registered again, so out_valid/dout follow in_valid by two enabled
// clocks. The document shows a butterfly fed by four sequencer outputs and
// the twiddle register with a single output; the two-register pipeline and
// the one-output-per-clock selection by k are this design's choices.
module r4_butterfly
  import cfd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  input  cplx_t      a [4],
  input  logic [1:0] k,
  input  cplx_t      tw,
  output logic       out_valid,
  output cplx_t      dout
);

  cplx_t s02, d02, s13, d13, y;
  cplx_t y_q, tw_q;
  logic  v_q;

  always_comb begin
    s02 = c_add(a[0], a[2]);
    d02 = c_sub(a[0], a[2]);
    s13 = c_add(a[1], a[3]);
    d13 = c_sub(a[1], a[3]);
    unique case (k)
      2'd0: y = c_add(s02, s13);
      2'd1: y = c_add(d02, c_mul_mj(d13));
      2'd2: y = c_sub(s02, s13);
      default: y = c_sub(d02, c_mul_mj(d13));
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      y_q       <= '0;
      tw_q      <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else if (en) begin
      v_q       <= in_valid;
      out_valid <= v_q;
      if (in_valid) begin
        y_q  <= y;
        tw_q <= tw;
      end
      if (v_q) dout <= c_mul(y_q, tw_q);
    end
  end

endmodule
