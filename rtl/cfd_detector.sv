// Cyclostationary feature detector for spectrum sensing of OFDM signals.
//
// The detector decides whether a primary user occupies the channel by
// looking for the periodicity that the cyclic prefix of OFDM symbols leaves
// in the lag-tau autocorrelation of the received baseband signal. One
// detection works on a frame of SAMPLES complex samples x(n) from the ADC
// (Q15.16 real in bits 63:32, imaginary in bits 31:0):
//   1. autocorrelator: r(n) = x(n) * conj(x(n - tau));
//   2. the frame is padded with zeros to N samples and transformed by the
//      pipelined radix-4 FFT (fft_r4), which delivers F(k) = X(k) + jY(k)
//      one bin per clock in digit-reversed order;
//   3. three MAC blocks average X^2, Y^2 and XY over all N bins (A, D, B),
//      while the frequency selector latches F(alpha) at the output position
//      given by count_value;
//   4. the test-statistic unit forms
//      T = (X^2 D + Y^2 A - 2XYB) / (AD - B^2) at alpha;
//   5. T is compared with the threshold register; decision = 1 means a
//      primary user is present.
//
// Interface: a frame is accepted on in_valid while in_ready is high and
// must arrive on SAMPLES consecutive clocks (the ADC streams one sample per
// clock); in_ready falls once SAMPLES samples have been taken and rises
// again when the decision is out. tau (1 .. TAU_MAX) and count_value must
// be stable during the frame. The threshold (Q47.16) can be rewritten at
// any time with thr_we/thr_din. stat_valid pulses with t_stat (Q47.16),
// and decision_valid pulses one clock later with decision.
//
// Timing for the defaults: the last FFT bin leaves about
// 5478 + N + 2 clocks after the first sample, the
// statistic follows some 110 clocks later.
//
// Blocks that are idle are held by their enables, standing in for the
// clock gating the document uses. The sizes (N = 4096, 4000 samples, a lag
// of 64, Q15.16 numbers) and the block structure follow the document; the
// zero padding, the frame handshake and the sequencing are this design's
// own choices.
module cfd_detector
  import cfd_pkg::*;
#(
  parameter int unsigned N       = 4096,  // FFT points
  parameter int unsigned SAMPLES = 4000,  // samples per detection (50 OFDM symbols of 80)
  parameter int unsigned TAU_MAX = 64     // delay memory depth, the largest lag
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // ADC samples
  input  logic                         in_valid,
  input  cplx_t                        x_in,
  output logic                         in_ready,
  // configuration
  input  logic [$clog2(TAU_MAX+1)-1:0] tau,
  input  logic [15:0]                  count_value,
  input  logic                         thr_we,
  input  logic signed [63:0]           thr_din,
  // results
  output logic signed [63:0]           t_stat,
  output logic                         stat_valid,
  output logic                         decision,
  output logic                         decision_valid,
  output logic                         alpha_found,   // F(alpha) was latched this frame
  output logic signed [63:0]           threshold,     // current threshold register
  output logic                         busy
);

  localparam int unsigned CW = $clog2(N + 1);

  // ---------------------------------------------------------------- framing
  logic          frame_busy;
  logic [CW-1:0] in_cnt;     // samples taken in this frame
  logic [CW-1:0] ac_cnt;     // autocorrelator outputs in this frame
  logic [CW-1:0] pad_cnt;
  logic          pad_active;
  logic          take;
  logic          frame_clr;

  assign in_ready = !frame_busy || (int'(in_cnt) < int'(SAMPLES));
  assign take     = in_valid && in_ready;
  assign busy     = frame_busy;

  // ---------------------------------------------------------- datapath nets
  logic  ac_valid;
  cplx_t ac_out;
  logic  fft_in_valid;
  cplx_t fft_in;
  logic  fft_out_valid;
  cplx_t fft_out;
  logic  fft_busy, fft_done;
  logic  stats_reset;
  q_t    mac_a, mac_b, mac_d;
  cplx_t f_alpha;
  logic  ts_start, ts_busy;
  logic [2:0] done_dly;

  autocorrelator #(.TAU_MAX(TAU_MAX)) u_acorr (
    .clk, .rst_n,
    .clr       (frame_clr),
    .in_valid  (take),
    .x_in,
    .tau,
    .out_valid (ac_valid),
    .r_out     (ac_out)
  );

  // Zero padding: SAMPLES products followed by N - SAMPLES zeros.
  assign fft_in_valid = ac_valid || pad_active;
  assign fft_in       = pad_active ? '0 : ac_out;

  fft_r4 #(.N(N)) u_fft (
    .clk, .rst_n,
    .in_valid  (fft_in_valid),
    .din       (fft_in),
    .out_valid (fft_out_valid),
    .dout      (fft_out),
    .busy      (fft_busy),
    .done      (fft_done)
  );

  // The statistics restart with the first FFT input of a frame.
  assign stats_reset = !rst_n || (fft_in_valid && !fft_busy);

  mac_unit u_mac_xx (.clk, .reset(stats_reset), .en(fft_out_valid),
                     .inp1(fft_out.re), .inp2(fft_out.re), .out(mac_a));
  mac_unit u_mac_yy (.clk, .reset(stats_reset), .en(fft_out_valid),
                     .inp1(fft_out.im), .inp2(fft_out.im), .out(mac_d));
  mac_unit u_mac_xy (.clk, .reset(stats_reset), .en(fft_out_valid),
                     .inp1(fft_out.re), .inp2(fft_out.im), .out(mac_b));

  freq_selector u_fsel (
    .clk,
    .reset       (stats_reset),
    .en          (fft_out_valid),
    .count_value,
    .inp         (fft_out),
    .out         (f_alpha),
    .found       (alpha_found)
  );

  // The MAC outputs settle two clocks after the last bin; fft_done comes
  // one clock after it, so three more clocks are ample.
  assign ts_start = done_dly[2];

  test_stat_unit u_ts (
    .clk, .rst_n,
    .start  (ts_start),
    .a      (mac_a),
    .b      (mac_b),
    .d      (mac_d),
    .f      (f_alpha),
    .busy   (ts_busy),
    .valid  (stat_valid),
    .t_stat
  );

  threshold_cmp u_thr (
    .clk, .rst_n,
    .thr_we, .thr_din,
    .stat_valid,
    .stat      (t_stat),
    .threshold,
    .decision,
    .decision_valid
  );

  assign frame_clr = decision_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame_busy <= 1'b0;
      in_cnt     <= '0;
      ac_cnt     <= '0;
      pad_cnt    <= '0;
      pad_active <= 1'b0;
      done_dly   <= '0;
    end else begin
      done_dly <= {done_dly[1:0], fft_done};
      if (take) begin
        frame_busy <= 1'b1;
        in_cnt     <= in_cnt + 1'b1;
      end
      if (ac_valid) begin
        ac_cnt <= ac_cnt + 1'b1;
        if (int'(ac_cnt) == int'(SAMPLES) - 1 && SAMPLES < N) begin
          pad_active <= 1'b1;
          pad_cnt    <= '0;
        end
      end
      if (pad_active) begin
        pad_cnt <= pad_cnt + 1'b1;
        if (int'(pad_cnt) == int'(N - SAMPLES) - 1) pad_active <= 1'b0;
      end
      if (decision_valid) begin
        frame_busy <= 1'b0;
        in_cnt     <= '0;
        ac_cnt     <= '0;
      end
    end
  end

  // Frames must stream without gaps: the FFT control relies on it.
  always_ff @(posedge clk)
    if (rst_n && frame_busy && int'(in_cnt) > 0 && int'(in_cnt) < int'(SAMPLES))
      assert (in_valid) else $error("cfd_detector: gap in the input frame");

  // A new statistic must not be requested while the previous one is pending.
  always_ff @(posedge clk)
    if (rst_n) assert (!(ts_start && ts_busy)) else $error("cfd_detector: statistic unit busy");

endmodule
