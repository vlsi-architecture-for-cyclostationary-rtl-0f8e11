// N-point pipelined radix-4 decimation-in-frequency FFT (N = 4096 by
// default, six stages).
//
// Samples enter one per clock at in_valid/din. The chain of STAGES
// fft_stage instances (block sizes N, N/4, ..., 4) performs the transform;
// each stage has its own ping-pong memories and butterfly, fetches its
// twiddle factors from the shared twiddle_gen, and is switched on by the
// control unit (fft_ctrl) only while data passes through it. The result
// leaves one bin per clock for N consecutive clocks, in base-4
// digit-reversed order: the j-th output is bin k where k is j with its
// base-4 digits reversed. No re-ordering is done, since the blocks that
// follow only accumulate over all bins or pick one known position.
//
// There is no scaling between stages: the transform is the plain sum
// F(k) = sum x(n) W_N^(nk) in Q15.16, and overflow wraps.
//
// Timing: the first output appears sum_s (M_s + 3) clocks after the first
// input (5478 for N = 4096). A frame must arrive on N consecutive clocks;
// the next frame may start once busy has fallen.
//
// The size, the radix, the six-stage pipeline with a register line between
// stages, the control unit and the shared twiddle generator follow the
// document; the absence of scaling and the control timing are this
// design's choices.
module fft_r4
  import cfd_pkg::*;
#(
  parameter int unsigned N = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t din,
  output logic  out_valid,
  output cplx_t dout,
  output logic  busy,
  output logic  done
);

  localparam int unsigned STAGES = $clog2(N) / 2;

  logic  [STAGES-1:0]    en_st;
  logic                  en_tf;
  logic                  v   [STAGES+1];
  cplx_t                 d   [STAGES+1];
  logic [$clog2(N)-1:0]  tw_addr [STAGES];
  cplx_t                 tw      [STAGES];

  assign v[0] = in_valid;
  assign d[0] = din;

  fft_ctrl #(.N(N), .STAGES(STAGES)) u_ctrl (
    .clk, .rst_n,
    .start (in_valid && !busy),
    .en_st, .en_tf, .busy, .done
  );

  twiddle_gen #(.N(N), .NPORTS(STAGES)) u_tw (
    .en_tf,
    .addr (tw_addr),
    .tw   (tw)
  );

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    fft_stage #(.N(N), .M(N >> (2 * s))) u_stage (
      .clk, .rst_n,
      .en        (en_st[s]),
      .in_valid  (v[s]),
      .din       (d[s]),
      .tw_addr   (tw_addr[s]),
      .tw_data   (tw[s]),
      .out_valid (v[s+1]),
      .dout      (d[s+1])
    );
  end

  assign out_valid = v[STAGES];
  assign dout      = d[STAGES];

endmodule
