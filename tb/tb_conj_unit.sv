// Checks the conjugate unit: real part unchanged, imaginary part negated,
// for random samples and the corner values 0, 1, -1 and the most negative.
module tb_conj_unit;
  import cfd_ref_pkg::*;

  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  conj_unit dut (.din, .dout);

  task automatic one(logic [63:0] v);
    din = v;
    #1;
    checks++;
    if (dout !== mk(re_of(v), -im_of(v))) begin
      failures++;
      $display("FAIL: conj(%h) = %h", v, dout);
    end
  endtask

  initial begin
    one(64'd0);
    one(mk(32'sd5, 32'sd1));
    one(mk(-32'sd7, -32'sd1));
    one(mk(32'sd3, 32'sh8000_0000));
    for (int i = 0; i < 200; i++) one({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
