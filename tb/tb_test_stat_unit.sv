// Checks the test-statistic unit against
// T = (X^2 D + Y^2 A - 2XYB) / (AD - B^2) computed with 128-bit integers
// (Q47.16, rounded toward zero), for random covariance values with
// AD > B^2, for a negative numerator, a zero denominator and a result that
// saturates; checks the latency (valid 105 clocks after start) and that a
// start while busy is ignored.
module tb_test_stat_unit;
  import cfd_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] a = '0, b = '0, d = '0;
  logic [63:0] f = '0;
  logic busy, valid;
  logic signed [63:0] t_stat;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  test_stat_unit dut (.clk, .rst_n, .start, .a, .b, .d, .f, .busy, .valid, .t_stat);

  localparam int LAT = 105;

  task automatic one(int32_t aa, int32_t bb, int32_t dd, int32_t x, int32_t y);
    int64_t e;
    int t0, nvalid;
    e = tstat_ref(aa, bb, dd, x, y);
    @(negedge clk);
    a = aa; b = bb; d = dd; f = mk(x, y); start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 1;     // ignored: busy
    a = 0; b = 0; d = 0; f = 0;
    @(negedge clk);
    start = 0;
    nvalid = 0;
    while (!valid) @(negedge clk);
    checks++;
    if (t_stat !== e || cycle - t0 != LAT) begin
      failures++;
      $display("FAIL: A=%0d B=%0d D=%0d X=%0d Y=%0d: T %0d expected %0d, latency %0d",
               aa, bb, dd, x, y, t_stat, e, cycle - t0);
    end
    @(negedge clk);
    checks++;
    if (busy || valid) begin failures++; $display("FAIL: not idle after result"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      logic [31:0] u1, u2, u3, u4, u5;
      int32_t aa, dd, bb;
      u1 = $urandom; u2 = $urandom; u3 = $urandom; u4 = $urandom; u5 = $urandom;
      aa = int32_t'({1'b0, u1[26:0]}) + 1;
      dd = int32_t'({1'b0, u2[26:0]}) + 1;
      bb = int32_t'($signed(u3[22:0]));
      one(aa, bb, dd, int32_t'($signed(u4[27:0])), int32_t'($signed(u5[27:0])));
    end
    one(32'sd65536, 32'sd0, 32'sd65536, 32'sd65536, 32'sd0);       // T = 1.0
    one(32'sd65536, 32'sd65536, 32'sd65536, 32'sd5, 32'sd7);        // AD = B^2
    one(32'sd65536, 32'sd98304, 32'sd65536, 32'sd65536, 32'sd65536); // negative determinant
    one(32'sd1, 32'sd0, 32'sd1, 32'sh7FFF_FFFF, 32'sh7FFF_FFFF);     // saturates
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
