// Checks the delay memory: after each push, dout (valid one clock later)
// must equal the sample pushed tau pushes earlier, or zero at the start of
// a frame. Covers the full lag 64, a short lag, pushes with gaps, and the
// clear between frames.
module tb_delay_fifo;
  import cfd_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, push = 0;
  logic [63:0] din = '0, dout;
  logic [6:0] tau = 7'd64;
  logic dout_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_fifo #(.TAU_MAX(64)) dut (.clk, .rst_n, .clr, .push, .din, .tau, .dout, .dout_valid);

  logic [63:0] hist [$];

  task automatic run(int lag, int count, bit gaps);
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    tau = 7'(lag);
    hist.delete();
    for (int n = 0; n < count; n++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      if (gaps && (n % 3 == 1)) @(negedge clk);
      push = 1; din = v;
      hist.push_back(v);
      @(negedge clk);
      push = 0;
      checks++;
      if (!dout_valid || dout !== ((n >= lag) ? hist[n - lag] : 64'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL lag %0d n %0d: %h", lag, n, dout);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(64, 300, 0);
    run(16, 100, 1);
    run(1, 50, 0);
    run(64, 150, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
