// Auto-correlator: y(n) = x(n) * conj(x(n - tau)).
//
// The incoming sample goes into the delay memory (delay_fifo), which returns
// x(n - tau) one cycle later. Meanwhile x(n) is held in a register so both
// operands line up; the delayed sample is conjugated (conj_unit) and a
// complex multiplier forms the product in Q15.16, which is registered.
// Latency is two clock cycles from in_valid to out_valid, and one sample
// per clock is accepted. For the first tau samples of a frame x(n - tau) is
// zero, so the product is zero.
//
// The structure (FIFO, conjugation by two's complement of the low 32 bits,
// one complex multiplier) follows the document; the two register stages,
// the truncating multiplier and the clr input that starts a new frame are
// this design's own choices.
module autocorrelator
  import cfd_pkg::*;
#(
  parameter int unsigned TAU_MAX = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,
  input  logic                         in_valid,
  input  cplx_t                        x_in,
  input  logic [$clog2(TAU_MAX+1)-1:0] tau,
  output logic                         out_valid,
  output cplx_t                        r_out
);

  cplx_t x_del;       // x(n - tau)
  logic  del_valid;
  cplx_t x_conj;      // x*(n - tau)
  cplx_t x_cur;       // x(n), aligned with x_del

  delay_fifo #(.TAU_MAX(TAU_MAX)) u_delay (
    .clk, .rst_n, .clr,
    .push       (in_valid),
    .din        (x_in),
    .tau,
    .dout       (x_del),
    .dout_valid (del_valid)
  );

  conj_unit u_conj (.din(x_del), .dout(x_conj));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      x_cur     <= '0;
      r_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) x_cur <= x_in;
      out_valid <= del_valid;
      if (del_valid) r_out <= c_mul(x_cur, x_conj);
    end
  end

endmodule
