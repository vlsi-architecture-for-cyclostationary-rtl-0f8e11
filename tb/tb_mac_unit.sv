// Checks the MAC block: random Q15.16 pairs are accumulated while en is
// high (with en dropping for some clocks in between, which must hold the
// accumulator); two clocks after en falls for good, out must equal the
// sum of the products divided by 2^AVG_SHIFT in Q15.16, saturated. reset
// must clear the sum; out must not move while products accumulate and must
// show the partial mean after a clock with en low. Runs three sums: a mixed-sign one, one that saturates
// high, one that saturates low.
module tb_mac_unit;
  import cfd_ref_pkg::*;

  logic clk = 0, reset = 1, en = 0;
  logic [31:0] inp1 = '0, inp2 = '0, out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_unit #(.ACC_W(80), .AVG_SHIFT(4)) dut (.clk, .reset, .en, .inp1, .inp2, .out);

  logic [31:0] prev_out = '0;

  task automatic run(int count, int mode);
    int128_t acc, s;
    int32_t e;
    @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    prev_out = out;
    acc = 0;
    for (int i = 0; i < count; i++) begin
      logic [31:0] u, w;
      int32_t a, b;
      u = $urandom; w = $urandom;
      case (mode)
        0: begin a = int32_t'($signed(u[23:0])); b = int32_t'($signed(w[23:0])); end
        1: begin a = int32_t'({1'b0, u[30:0]}); b = a; end          // large positive squares
        default: begin a = int32_t'({1'b0, u[30:0]}); b = -a; end
      endcase
      acc += int128_t'(a) * int128_t'(b);
      en = 1; inp1 = a; inp2 = b;
      @(negedge clk);
      // The output pins hold still while products are accumulated; after a
      // clock with en low they show the partial mean up to that point.
      checks++;
      if (i % 5 == 3) begin
        int128_t ps;
        int32_t pe;
        ps = (acc - int128_t'(a) * int128_t'(b)) >>> 20;
        pe = (ps > 128'sd2147483647) ? 32'sh7FFF_FFFF : (ps < -128'sd2147483648) ? 32'sh8000_0000 : int32_t'(ps);
        if (out !== pe) begin failures++; $display("FAIL: partial mean %h expected %h", out, pe); end
      end else if (i > 0 && out !== prev_out) begin
        failures++;
        $display("FAIL: out moved during accumulation");
      end
      prev_out = out;
      if (i % 5 == 2) begin
        en = 0; inp1 = 32'hDEAD_BEEF; inp2 = 32'h1234_5678;   // must be ignored
        @(negedge clk);
      end
    end
    en = 0;
    repeat (2) @(negedge clk);
    s = acc >>> 20;
    e = (s > 128'sd2147483647) ? 32'sh7FFF_FFFF : (s < -128'sd2147483648) ? 32'sh8000_0000 : int32_t'(s);
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL mode %0d: out %h expected %h", mode, out, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(200, 0);
    run(100, 1);
    run(100, 2);
    run(1, 0);
    // reset clears
    @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    @(negedge clk);
    checks++;
    if (out !== 32'd0) begin failures++; $display("FAIL: out %h after reset", out); end
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
