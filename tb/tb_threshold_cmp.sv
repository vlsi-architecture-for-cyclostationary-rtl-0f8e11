// Checks the threshold register and comparator: the reset value 4.6052 in
// Q47.16 (301804), decisions one clock after each statistic for values
// below, equal to and above the threshold, a rewrite of the threshold, and
// that the decision holds between statistics.
module tb_threshold_cmp;
  logic clk = 0, rst_n = 0, thr_we = 0, stat_valid = 0;
  logic signed [63:0] thr_din = '0, stat = '0, threshold;
  logic decision, decision_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  threshold_cmp dut (.clk, .rst_n, .thr_we, .thr_din, .stat_valid, .stat, .threshold, .decision, .decision_valid);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  task automatic present(logic signed [63:0] v, bit want);
    @(negedge clk);
    stat_valid = 1; stat = v;
    @(negedge clk);
    stat_valid = 0; stat = '0;
    chk(decision_valid && decision == want, $sformatf("stat %0d vs %0d", v, threshold));
    @(negedge clk);
    chk(!decision_valid && decision == want, "decision held");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(threshold == 64'sd301804, "reset threshold");
    present(64'sd301803, 0);
    present(64'sd301804, 0);
    present(64'sd301805, 1);
    present(-64'sd5, 0);
    thr_we = 1; thr_din = -64'sd10;
    @(negedge clk);
    thr_we = 0;
    chk(threshold == -64'sd10, "threshold written");
    present(-64'sd5, 1);
    present(-64'sd11, 0);
    for (int i = 0; i < 50; i++) begin
      logic signed [63:0] v;
      v = $signed({$urandom, $urandom});
      present(v, v > -64'sd10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
