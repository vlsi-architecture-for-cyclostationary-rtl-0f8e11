// Checks the radix-4 butterfly: for random inputs, output index k and
// twiddle factor, dout must be (sum_i a_i (-j)^(ik)) * W, two enabled clocks
// after the input; holding en low must freeze the pipeline.
module tb_r4_butterfly;
  import cfd_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [63:0] a [4];
  logic [1:0] k = 0;
  logic [63:0] tw = '0, dout;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  r4_butterfly dut (.clk, .rst_n, .en, .in_valid, .a, .k, .tw, .out_valid, .dout);

  logic [63:0] expq [$];
  always @(posedge clk) if (rst_n && en && out_valid) begin
    logic [63:0] e;
    e = expq.pop_front();
    checks++;
    if (dout !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: got %h expected %h", dout, e);
    end
  end

  function automatic int32_t rnd_small();
    logic [31:0] u;
    u = $urandom;
    return int32_t'($signed(u[23:0]));
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) a[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [63:0] y;
      for (int i = 0; i < 4; i++) a[i] = mk(rnd_small(), rnd_small());
      k = 2'($urandom);
      tw = twiddle($urandom % 64, 64);
      y = 64'd0;
      for (int p = 0; p < 4; p++) y = cadd(y, rot_mj(a[p], p * int'(k)));
      expq.push_back(cmul(y, tw));
      in_valid = 1;
      // stall now and then: the data must survive
      en = (n % 7 != 3);
      @(negedge clk);
      while (!en) begin en = 1; @(negedge clk); en = 1; end
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", expq.size()); end
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
