// Delay memory: a FIFO that returns the sample written tau pushes earlier.
//
// It is a circular buffer of TAU_MAX words. Each push writes the new sample
// at the write pointer and, in the same cycle, reads the word written tau
// pushes ago (pointer minus tau, modulo TAU_MAX), so the output dout is
// x(n - tau) aligned with the input x(n) of the same push. The result is
// registered: dout is valid the cycle after the push, flagged by dout_valid.
// Until tau samples have been pushed since reset the buffer holds zeros, so
// x(n - tau) = 0 for n < tau.
//
// tau is a run-time input (1 .. TAU_MAX) because the lag is reconfigurable;
// it must be held constant during a frame. The default lag of 64 is the
// document's; the pointer arithmetic and the zero start are this design's
// own choices.
module delay_fifo
  import cfd_pkg::*;
#(
  parameter int unsigned TAU_MAX = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,        // synchronous: zero the buffer
  input  logic                         push,
  input  cplx_t                        din,
  input  logic [$clog2(TAU_MAX+1)-1:0] tau,
  output cplx_t                        dout,
  output logic                         dout_valid
);

  localparam int unsigned AW = (TAU_MAX > 1) ? $clog2(TAU_MAX) : 1;

  cplx_t          mem [TAU_MAX];
  logic [AW-1:0]  wptr;
  logic [AW-1:0]  rptr;

  // Read address = wptr - tau modulo TAU_MAX (tau == TAU_MAX gives wptr).
  always_comb begin
    int unsigned diff;
    diff = (int'(wptr) + TAU_MAX - int'(tau)) % TAU_MAX;
    rptr = AW'(diff);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int i = 0; i < TAU_MAX; i++) mem[i] <= '0;
      wptr       <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= push;
      if (push) begin
        dout     <= mem[rptr];
        mem[wptr] <= din;
        wptr     <= (int'(wptr) == TAU_MAX - 1) ? '0 : wptr + 1'b1;
      end
    end
  end

endmodule
