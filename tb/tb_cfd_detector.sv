// End-to-end test of the cyclostationary detector at its full size
// (N = 4096-point FFT, 4000 samples per frame, lag 64).
//
// Frames of OFDM signal plus noise, and of noise alone, are generated,
// streamed in one sample per clock, and every stage of the result is checked
// against the array models in cfd_ref_pkg: each of the 4096 FFT outputs in
// stream order, the three averages, the selected bin, the statistic and
// the decision. It also checks the timing (the FFT's first output 5481
// clocks after its first input, 4096 bins on consecutive clocks) and counts
// the mechanisms the design has: zero padding, the stage enables switching
// on and off, the frequency selector latching, a threshold rewrite, a lag
// change, and both decisions.
module tb_cfd_detector;
  import cfd_ref_pkg::*;

  localparam int N       = 4096;
  localparam int SAMPLES = 4000;
  localparam int ALPHA   = 51;        // nearest bin to the cyclic frequency N/80
  localparam int FFT_LAT = 5478;      // sum over stages of (M + 3)

  logic clk = 0;
  logic rst_n = 0;
  logic in_valid = 0;
  logic [63:0] x_in = '0;
  logic in_ready;
  logic [6:0] tau = 7'd64;
  logic [15:0] count_value = '0;
  logic thr_we = 0;
  logic signed [63:0] thr_din = '0;
  logic signed [63:0] t_stat, threshold;
  logic stat_valid, decision, decision_valid, alpha_found, busy;

  always #5 clk = ~clk;

  cfd_detector dut (
    .clk, .rst_n, .in_valid, .x_in, .in_ready, .tau, .count_value,
    .thr_we, .thr_din, .t_stat, .stat_valid, .decision, .decision_valid,
    .alpha_found, .threshold, .busy
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- expected FFT stream of the current frame
  logic [63:0] exp_fft [];
  int out_idx = 0;
  int first_in_cycle = -1, first_out_cycle = -1, last_out_cycle = -1;
  int fft_mismatch = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.fft_in_valid && !dut.fft_busy) first_in_cycle = cycle;
    if (dut.fft_out_valid) begin
      if (out_idx == 0) first_out_cycle = cycle;
      last_out_cycle = cycle;
      if (exp_fft.size() == N && out_idx < N && dut.fft_out !== exp_fft[out_idx]) begin
        fft_mismatch++;
        if (fft_mismatch < 5)
          $display("FFT out %0d: got %h expected %h", out_idx, dut.fft_out, exp_fft[out_idx]);
      end
      out_idx++;
    end
  end

  // ---- mechanism counters
  int n_pad = 0, n_en_on = 0, n_en_off = 0, n_found = 0;
  int n_dec1 = 0, n_dec0 = 0, n_thr_wr = 0, n_tau_chg = 0;
  logic [5:0] en_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pad_active) n_pad++;
    for (int s = 0; s < 6; s++) begin
      if (dut.u_fft.en_st[s] && !en_prev[s]) n_en_on++;
      if (!dut.u_fft.en_st[s] && en_prev[s]) n_en_off++;
    end
    en_prev = dut.u_fft.en_st;
    if (decision_valid) begin
      if (decision) n_dec1++; else n_dec0++;
    end
  end

  task automatic run_frame(bit signal_on, real snr_db, int lag, string name);
    logic [63:0] x [];
    logic [63:0] f [];
    int32_t ea, eb, ed;
    int64_t et;
    logic [63:0] falpha;
    bit exp_dec;
    int t0;

    x = new[SAMPLES];
    f = new[N];
    ofdm_frame(x, SAMPLES, signal_on, snr_db);
    // model: autocorrelation, zero padding, FFT, statistics
    for (int n = 0; n < N; n++) begin
      if (n < SAMPLES) begin
        logic [63:0] xd;
        xd = (n >= lag) ? x[n - lag] : 64'd0;
        f[n] = cmul(x[n], mk(re_of(xd), -im_of(xd)));
      end else f[n] = 64'd0;
    end
    fft_dif4(f, N);
    exp_fft = f;
    ea = mac_ref(f, N, 0, 12);
    ed = mac_ref(f, N, 1, 12);
    eb = mac_ref(f, N, 2, 12);
    falpha = f[digrev4(ALPHA, N)];
    et = tstat_ref(ea, eb, ed, re_of(falpha), im_of(falpha));

    @(negedge clk);
    tau = 7'(lag);
    count_value = 16'(digrev4(ALPHA, N));
    out_idx = 0; fft_mismatch = 0;
    check(in_ready, {name, ": ready before frame"});
    for (int n = 0; n < SAMPLES; n++) begin
      in_valid = 1;
      x_in = x[n];
      @(negedge clk);
    end
    in_valid = 0;
    check(!in_ready, {name, ": not ready after SAMPLES samples"});
    t0 = cycle;
    while (!decision_valid) @(negedge clk);
    exp_dec = et > threshold;

    check(fft_mismatch == 0, $sformatf("%s: %0d FFT outputs differ", name, fft_mismatch));
    check(out_idx == N, $sformatf("%s: %0d FFT outputs, expected %0d", name, out_idx, N));
    check(last_out_cycle - first_out_cycle == N - 1, $sformatf("%s: FFT outputs not on consecutive clocks", name));
    check(first_out_cycle - first_in_cycle == FFT_LAT,
          $sformatf("%s: FFT latency %0d, expected %0d", name, first_out_cycle - first_in_cycle, FFT_LAT));
    check(dut.mac_a == ea, $sformatf("%s: A %0d expected %0d", name, dut.mac_a, ea));
    check(dut.mac_b == eb, $sformatf("%s: B %0d expected %0d", name, dut.mac_b, eb));
    check(dut.mac_d == ed, $sformatf("%s: D %0d expected %0d", name, dut.mac_d, ed));
    check(alpha_found && dut.f_alpha == falpha, $sformatf("%s: F(alpha) %h expected %h", name, dut.f_alpha, falpha));
    if (alpha_found) n_found++;
    check(t_stat == et, $sformatf("%s: T %0d expected %0d", name, t_stat, et));
    check(decision == exp_dec, $sformatf("%s: decision %0b expected %0b", name, decision, exp_dec));
    $display("%s: T = %f (threshold %f) decision %0b, %0d clocks after the last sample",
             name, real'(t_stat) / 65536.0, real'(threshold) / 65536.0, decision, cycle - t0);
    @(negedge clk);
    check(in_ready && !busy, {name, ": ready again after decision"});
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(threshold == 64'sd301804, "default threshold");
    run_frame(1, 0.0, 64, "OFDM 0 dB");
    run_frame(0, 0.0, 64, "noise only");
    // raise the threshold so the same kind of frame is declared free
    @(negedge clk);
    thr_we = 1; thr_din = 64'sd1 <<< 40; n_thr_wr++;
    @(negedge clk);
    thr_we = 0;
    check(threshold == (64'sd1 <<< 40), "threshold rewrite");
    run_frame(1, 0.0, 64, "OFDM 0 dB, high threshold");
    // another lag
    n_tau_chg++;
    run_frame(1, 10.0, 16, "OFDM 10 dB, lag 16");

    check(n_pad == 4 * (N - SAMPLES), $sformatf("zero padding clocks %0d", n_pad));
    check(n_en_on == 24 && n_en_off == 24, $sformatf("stage enables on %0d off %0d", n_en_on, n_en_off));
    check(n_found == 4, "frequency selector latched in every frame");
    check(n_dec1 > 0, "primary user detected at least once");
    check(n_dec0 > 0, "channel declared free at least once");
    check(n_thr_wr > 0 && n_tau_chg > 0, "reconfiguration exercised");
    $display("mechanisms: pad=%0d en_on=%0d en_off=%0d found=%0d dec1=%0d dec0=%0d thr_wr=%0d tau_chg=%0d",
             n_pad, n_en_on, n_en_off, n_found, n_dec1, n_dec0, n_thr_wr, n_tau_chg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
