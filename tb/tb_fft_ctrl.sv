// Checks the FFT control unit for N = 64 (three stages, block sizes 64, 16
// and 4): after a start, en_st[s] must be high exactly on the clocks
// [T_s, T_s + M_s + 3 + N + 1) with T_0 = 0, T_1 = 67, T_2 = 86, where the
// numbers are worked out by hand from the stage sizes; en_tf must be the OR
// of the stage enables, busy must fall and done pulse at clock 157, and a
// start while busy must be ignored. Two frames are run.
module tb_fft_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] en_st;
  logic en_tf, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_ctrl #(.N(64), .STAGES(3)) dut (.clk, .rst_n, .start, .en_st, .en_tf, .busy, .done);

  // window start / end (exclusive) per stage, by hand
  int t_on  [3] = '{0, 67, 86};
  int t_off [3] = '{0 + 64 + 3 + 64 + 1, 67 + 16 + 3 + 64 + 1, 86 + 4 + 3 + 64 + 1};
  localparam int T_DONE = 64 + 3 + 16 + 3 + 4 + 3 + 64;   // 157

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  task automatic frame();
    int ndone;
    ndone = 0;
    for (int t = 0; t < 200; t++) begin
      start = (t == 0) || (t == 30);   // the second start must be ignored
      #1;
      for (int s = 0; s < 3; s++)
        chk(en_st[s] == (t >= t_on[s] && t < t_off[s]), $sformatf("en_st[%0d] at t=%0d is %0b", s, t, en_st[s]));
      chk(en_tf == |en_st, "en_tf");
      @(posedge clk);
      #1;
      if (done) begin
        ndone++;
        chk(t == T_DONE, $sformatf("done after clock %0d", t));
      end
      @(negedge clk);
    end
    chk(ndone == 1, $sformatf("%0d done pulses", ndone));
    chk(!busy, "idle after frame");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(en_st == 0 && !en_tf && !busy, "idle after reset");
    frame();
    frame();
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
