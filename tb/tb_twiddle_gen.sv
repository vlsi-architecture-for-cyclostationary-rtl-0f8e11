// Checks the twiddle generator at its full size (4096 entries): every
// entry on every port against round(65536 * exp(-j 2 pi m / N)), the
// symmetries W^(m + N/4) = -j W^m and W^(N - m) = conj(W^m) exactly, and
// zero output while en_tf is low.
module tb_twiddle_gen;
  import cfd_ref_pkg::*;

  localparam int N = 4096;
  localparam int P = 6;

  logic en_tf = 1;
  logic [11:0] addr [P];
  logic [63:0] tw [P];
  int checks = 0, failures = 0;

  twiddle_gen #(.N(N), .NPORTS(P)) dut (.en_tf, .addr, .tw);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    #1;
    for (int m = 0; m < N; m++) begin
      for (int p = 0; p < P; p++) addr[p] = 12'((m + p * 683) % N);
      #1;
      for (int p = 0; p < P; p++)
        chk(tw[p] === twiddle((m + p * 683) % N, N), $sformatf("port %0d entry %0d: %h", p, (m + p * 683) % N, tw[p]));
    end
    // quarter-turn symmetry, checked through two ports
    for (int m = 1; m < N / 4; m += 37) begin
      addr[0] = 12'(m); addr[1] = 12'(m + N / 4); addr[2] = 12'(N - m);
      #1;
      chk(tw[1] === rot_mj(tw[0], 1), $sformatf("quarter turn at %0d", m));
      chk(tw[2] === mk(re_of(tw[0]), -im_of(tw[0])), $sformatf("mirror at %0d", m));
    end
    en_tf = 0;
    #1;
    for (int p = 0; p < P; p++) chk(tw[p] === 64'd0, "disabled output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
