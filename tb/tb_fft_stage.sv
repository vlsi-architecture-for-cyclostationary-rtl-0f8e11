// Checks one radix-4 FFT stage with block size M = 16 inside a 64-point
// transform (twiddle step 4), with twiddle factors supplied by the
// testbench from the formula. For every block of 16 inputs the outputs
// must be, in order p = k*4 + n, (sum_i a[n + 4i] (-j)^(ik)) * W_64^(4nk).
// Blocks arrive first back to back (then the first output must come M + 3
// clocks after the first input and the output stream must have no gaps),
// then with random gaps, and en is dropped for a while between blocks.
module tb_fft_stage;
  import cfd_ref_pkg::*;

  localparam int N = 64;
  localparam int M = 16;
  localparam int Q = M / 4;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [63:0] din = '0, dout, tw_data;
  logic [5:0] tw_addr;
  logic out_valid;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fft_stage #(.N(N), .M(M)) dut (.clk, .rst_n, .en, .in_valid, .din, .tw_addr, .tw_data, .out_valid, .dout);

  assign tw_data = twiddle(int'(tw_addr), N);

  logic [63:0] expq [$];
  int first_out = -1, last_out = -1, nout = 0;
  always @(posedge clk) if (rst_n && en && out_valid) begin
    logic [63:0] e;
    e = expq.pop_front();
    checks++;
    if (dout !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: output %0d got %h expected %h", nout, dout, e);
    end
    if (first_out < 0) first_out = cycle;
    last_out = cycle;
    nout++;
  end

  function automatic int32_t rnd_small();
    logic [31:0] u;
    u = $urandom;
    return int32_t'($signed(u[21:0]));
  endfunction

  task automatic block(bit gaps);
    logic [63:0] a [M];
    for (int i = 0; i < M; i++) a[i] = mk(rnd_small(), rnd_small());
    for (int k = 0; k < 4; k++)
      for (int n = 0; n < Q; n++) begin
        logic [63:0] y;
        y = 64'd0;
        for (int p = 0; p < 4; p++) y = cadd(y, rot_mj(a[n + p * Q], p * k));
        expq.push_back(cmul(y, twiddle(n * k * (N / M), N)));
      end
    for (int i = 0; i < M; i++) begin
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1; din = a[i];
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t0 = cycle;
    for (int b = 0; b < 4; b++) block(0);
    repeat (M + 4) @(negedge clk);
    checks++;
    if (first_out - t0 != M + 3 || last_out - first_out != 4 * M - 1 || nout != 4 * M) begin
      failures++;
      $display("FAIL: timing first %0d last %0d count %0d", first_out - t0, last_out - first_out, nout);
    end
    for (int b = 0; b < 3; b++) block(1);
    // freeze the stage while its last block is being read out
    repeat (3) @(negedge clk);
    en = 0;
    repeat (10) @(negedge clk);
    en = 1;
    repeat (M + 6) @(negedge clk);
    checks++;
    if (expq.size() != 0 || nout != 7 * M) begin
      failures++;
      $display("FAIL: %0d outputs missing, %0d seen", expq.size(), nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
