// Checks the frequency selector: a stream of 4096 random words is presented
// (with en low on some clocks, which must not count); out must hold the
// word at stream position count_value from then on, found must rise with
// it, and a reset must clear both and load a new count value. Positions 0,
// 4, a middle one and the last are tried.
module tb_freq_selector;
  logic clk = 0, reset = 1, en = 0;
  logic [15:0] count_value = '0;
  logic [63:0] inp = '0, out;
  logic found;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  freq_selector dut (.clk, .reset, .en, .count_value, .inp, .out, .found);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  task automatic run(int pos);
    logic [63:0] want;
    @(negedge clk);
    reset = 1; count_value = 16'(pos);
    @(negedge clk);
    reset = 0; count_value = 16'hFFFF;   // the register must keep the old value
    chk(!found && out === 64'd0, "cleared by reset");
    for (int i = 0; i < 4096; i++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      if (i == pos) want = v;
      if (i % 9 == 4) begin en = 0; inp = ~v; @(negedge clk); end
      en = 1; inp = v;
      @(negedge clk);
      if (i == pos) chk(found && out === want, $sformatf("latched at %0d", pos));
      if (i < pos) chk(!found, "found too early");
    end
    en = 0;
    @(negedge clk);
    chk(found && out === want, $sformatf("held value for position %0d", pos));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(0);
    run(4);
    run(1234);
    run(4095);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
