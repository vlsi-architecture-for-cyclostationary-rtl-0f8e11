// Twiddle factor generator for an N-point FFT.
//
// Holds one full turn of twiddle factors, W_N^m = cos(2*pi*m/N) -
// j*sin(2*pi*m/N) for m = 0 .. N-1, as Q15.16 complex words (each part is
// round(65536 * value)). The table is filled once at start-up from the
// formula, as a read-only memory would be initialised. NPORTS independent
// read ports serve the FFT stages, each asking for the index it needs in
// the current cycle; reads are combinational. en_tf is the generator's
// enable from the FFT control unit: while it is low every port returns zero,
// standing in for the clock-gated, idle generator.
//
// The document names the generator and shows it feeding every stage; the
// full-turn table and the per-stage read ports are this design's choice.
module twiddle_gen
  import cfd_pkg::*;
#(
  parameter int unsigned N      = 4096,
  parameter int unsigned NPORTS = 6
) (
  input  logic                 en_tf,
  input  logic [$clog2(N)-1:0] addr [NPORTS],
  output cplx_t                tw   [NPORTS]
);

  cplx_t rom [N];

  function automatic q_t to_q(real v);
    real s;
    s = v * 65536.0;
    return q_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  initial begin
    for (int m = 0; m < int'(N); m++) begin
      real ang;
      ang = 2.0 * 3.14159265358979323846 * real'(m) / real'(N);
      rom[m].re = to_q($cos(ang));
      rom[m].im = to_q(-$sin(ang));
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      tw[p] = en_tf ? rom[addr[p]] : '0;
  end

endmodule
