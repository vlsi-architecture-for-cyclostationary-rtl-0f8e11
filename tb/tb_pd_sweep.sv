// Detection-probability sweep of the full-size detector (N = 4096, 4000
// samples, lag 64, threshold at its reset value).
//
// For each SNR in the list, FRAMES frames of 50 OFDM symbols (QPSK on 64
// subcarriers, 16-sample cyclic prefix) in white Gaussian noise are run
// through the detector, plus FRAMES frames of noise alone. Every statistic
// is checked bit for bit against the array model and every decision
// against the threshold; the fraction of frames declared occupied is
// printed per SNR (probability of detection) and for noise alone
// (false-alarm rate). The rates are reported, not checked: with a few
// frames per point they are coarse.
module tb_pd_sweep;
  import cfd_ref_pkg::*;

  localparam int N       = 4096;
  localparam int SAMPLES = 4000;
  localparam int ALPHA   = 51;
  localparam int FRAMES  = 20;
  localparam int NSNR    = 6;
  real snrs [NSNR] = '{-22.0, -18.0, -14.0, -10.0, -6.0, 0.0};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0] x_in = '0;
  logic in_ready;
  logic [6:0] tau = 7'd64;
  logic [15:0] count_value;
  logic thr_we = 0;
  logic signed [63:0] thr_din = '0, t_stat, threshold;
  logic stat_valid, decision, decision_valid, alpha_found, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfd_detector dut (
    .clk, .rst_n, .in_valid, .x_in, .in_ready, .tau, .count_value,
    .thr_we, .thr_din, .t_stat, .stat_valid, .decision, .decision_valid,
    .alpha_found, .threshold, .busy
  );

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // Runs one frame, returns the decision.
  task automatic frame(bit signal_on, real snr_db, output bit dec);
    logic [63:0] x [];
    logic [63:0] f [];
    logic [63:0] fa;
    int64_t et;
    x = new[SAMPLES];
    f = new[N];
    ofdm_frame(x, SAMPLES, signal_on, snr_db);
    for (int n = 0; n < N; n++) begin
      if (n < SAMPLES) begin
        logic [63:0] xd;
        xd = (n >= 64) ? x[n - 64] : 64'd0;
        f[n] = cmul(x[n], mk(re_of(xd), -im_of(xd)));
      end else f[n] = 64'd0;
    end
    fft_dif4(f, N);
    fa = f[digrev4(ALPHA, N)];
    et = tstat_ref(mac_ref(f, N, 0, 12), mac_ref(f, N, 2, 12), mac_ref(f, N, 1, 12), re_of(fa), im_of(fa));
    @(negedge clk);
    for (int n = 0; n < SAMPLES; n++) begin
      in_valid = 1; x_in = x[n];
      @(negedge clk);
    end
    in_valid = 0;
    while (!decision_valid) @(negedge clk);
    chk(t_stat == et, $sformatf("T %0d expected %0d", t_stat, et));
    chk(decision == (et > threshold), "decision");
    dec = decision;
    @(negedge clk);
  endtask

  initial begin
    int hits;
    bit d;
    count_value = 16'(digrev4(ALPHA, N));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    hits = 0;
    for (int i = 0; i < FRAMES; i++) begin frame(0, 0.0, d); hits += d; end
    $display("noise only: false-alarm rate %0d/%0d", hits, FRAMES);
    for (int s = 0; s < NSNR; s++) begin
      hits = 0;
      for (int i = 0; i < FRAMES; i++) begin frame(1, snrs[s], d); hits += d; end
      $display("SNR %6.1f dB: detection rate %0d/%0d", snrs[s], hits, FRAMES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
