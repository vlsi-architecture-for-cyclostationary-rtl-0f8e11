// Checks the autocorrelator: for a stream of random samples (kept small so
// the products do not wrap) the output must be x(n) * conj(x(n - tau)),
// with x(n - tau) = 0 for n < tau, two clocks after each input, one result
// per clock.
module tb_autocorrelator;
  import cfd_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [63:0] x_in = '0, r_out;
  logic [6:0] tau = 7'd64;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  autocorrelator #(.TAU_MAX(64)) dut (.clk, .rst_n, .clr, .in_valid, .x_in, .tau, .out_valid, .r_out);

  logic [63:0] xs [$];
  logic [63:0] expq [$];
  int in_cyc [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    int c;
    e = expq.pop_front();
    c = in_cyc.pop_front();
    checks++;
    if (r_out !== e || cycle - c != 2) begin
      failures++;
      if (failures < 10) $display("FAIL: got %h expected %h latency %0d", r_out, e, cycle - c);
    end
  end

  function automatic int32_t rnd_small();
    logic [31:0] u;
    u = $urandom;
    return int32_t'($signed(u[19:0]));   // |v| < 8 in Q15.16
  endfunction

  task automatic frame(int lag, int count);
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    tau = 7'(lag);
    xs.delete();
    for (int n = 0; n < count; n++) begin
      logic [63:0] v, d;
      v = mk(rnd_small(), rnd_small());
      xs.push_back(v);
      d = (n >= lag) ? xs[n - lag] : 64'd0;
      expq.push_back(cmul(v, mk(re_of(d), -im_of(d))));
      in_cyc.push_back(cycle);
      in_valid = 1; x_in = v;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(64, 400);
    frame(5, 60);
    check_empty: begin
      checks++;
      if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    end
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
