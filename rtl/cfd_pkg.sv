// Shared number formats and arithmetic for the cyclostationary detector.
//
// Every real number in the datapath is a 32-bit two's-complement Q15.16
// value: 1 sign bit, 15 integer bits, 16 fraction bits. A complex sample is
// 64 bits wide with the real part in the upper 32 bits and the imaginary
// part in the lower 32 bits; cplx_t is a packed struct laid out that way so
// it can be passed around as a plain 64-bit vector.
//
// Products of two Q15.16 values are formed at full 64-bit precision and
// brought back to Q15.16 by dropping the 16 lowest fraction bits
// (truncation toward minus infinity) and keeping the next 32 bits, so an
// overflow wraps around as in plain two's-complement hardware. The number
// format follows the document; truncation and wrap-around are this design's
// own choice.
package cfd_pkg;

  localparam int unsigned QW = 32;  // width of one real number
  localparam int unsigned QF = 16;  // fraction bits

  typedef logic signed [QW-1:0] q_t;

  typedef struct packed {
    q_t re;  // bits 63:32
    q_t im;  // bits 31:0
  } cplx_t;

  // Q15.16 x Q15.16 -> Q15.16, truncated, wrapping.
  function automatic q_t q_mul(q_t a, q_t b);
    logic signed [2*QW-1:0] p;
    p = a * b;
    return p[QF +: QW];
  endfunction

  // Complex product with the same rounding as q_mul on each term.
  function automatic cplx_t c_mul(cplx_t a, cplx_t b);
    logic signed [2*QW-1:0] rr, ii, ri, ir, re_full, im_full;
    cplx_t r;
    rr = a.re * b.re;
    ii = a.im * b.im;
    ri = a.re * b.im;
    ir = a.im * b.re;
    re_full = rr - ii;
    im_full = ri + ir;
    r.re = re_full[QF +: QW];
    r.im = im_full[QF +: QW];
    return r;
  endfunction

  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // Multiplication by -j: (a + jb)(-j) = b - ja.
  function automatic cplx_t c_mul_mj(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

endpackage
