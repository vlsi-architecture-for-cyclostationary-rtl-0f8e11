// Conjugate computation: turns a 64-bit complex sample into its complex
// conjugate.
//
// The real part (upper 32 bits) passes unchanged. The imaginary part (lower
// 32 bits) is negated in two's complement: every bit is inverted and one is
// added, as the document draws it with a bank of inverters feeding an adder
// whose other operand is the constant 1. The two halves are then
// concatenated again. Purely combinational, no clock.
//
// Ports: din is x(n - tau) as {re, im}; dout is x*(n - tau).
// Negating the most negative number wraps to itself, as plain two's
// complement does.
module conj_unit
  import cfd_pkg::*;
(
  input  cplx_t din,
  output cplx_t dout
);

  q_t inverted;

  always_comb begin
    inverted = ~din.im;
    dout.re  = din.re;
    dout.im  = inverted + q_t'(1);
  end

endmodule
