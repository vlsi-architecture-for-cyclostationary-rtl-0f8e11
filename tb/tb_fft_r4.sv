// Checks the pipelined FFT at N = 64 (three stages) and N = 256 (four
// stages): each output stream must match, bit for bit and in order, the
// in-place radix-4 array model left in digit-reversed order, and, as an
// independent check of the transform itself, each output must be within a
// small tolerance of a floating-point DFT of the same input at the bin its
// stream position names. Also checks the latency (sum of M + 3 over the
// stages), N outputs on consecutive clocks, and two frames one after the
// other.
module tb_fft_r4;
  import cfd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic        v64, v256, o64, o256, b64, b256, d64, d256;
  logic [63:0] in64, in256, out64, out256;

  fft_r4 #(.N(64))  dut64  (.clk, .rst_n, .in_valid(v64),  .din(in64),  .out_valid(o64),  .dout(out64),  .busy(b64),  .done(d64));
  fft_r4 #(.N(256)) dut256 (.clk, .rst_n, .in_valid(v256), .din(in256), .out_valid(o256), .dout(out256), .busy(b256), .done(d256));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // One frame through the FFT of size n; sel picks the instance.
  task automatic frame(int n, int lat);
    logic [63:0] x [];
    logic [63:0] m [];
    int t_in, t_first, got, t_last;
    real err_max;
    x = new[n];
    for (int i = 0; i < n; i++) begin
      logic [31:0] u, w;
      u = $urandom; w = $urandom;
      x[i] = mk(int32_t'($signed(u[17:0])), int32_t'($signed(w[17:0])));
    end
    m = x;
    fft_dif4(m, n);
    err_max = 0.0;
    got = 0; t_first = -1; t_last = -1;
    @(negedge clk);
    t_in = cycle;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          if (n == 64) begin v64 = 1; in64 = x[i]; end else begin v256 = 1; in256 = x[i]; end
          @(negedge clk);
        end
        v64 = 0; v256 = 0;
      end
      begin
        while (got < n) begin
          @(posedge clk);
          if ((n == 64) ? o64 : o256) begin
            logic [63:0] o;
            real dr, di, er;
            int bin;
            o = (n == 64) ? out64 : out256;
            if (t_first < 0) t_first = cycle;
            t_last = cycle;
            chk(o === m[got], $sformatf("N=%0d output %0d: %h expected %h", n, got, o, m[got]));
            bin = digrev4(got, n);
            dr = 0.0; di = 0.0;
            for (int t = 0; t < n; t++) begin
              real ang;
              ang = -2.0 * 3.14159265358979323846 * real'((t * bin) % n) / real'(n);
              dr += from_q(re_of(x[t])) * $cos(ang) - from_q(im_of(x[t])) * $sin(ang);
              di += from_q(re_of(x[t])) * $sin(ang) + from_q(im_of(x[t])) * $cos(ang);
            end
            er = (dr - from_q(re_of(o))) ** 2 + (di - from_q(im_of(o))) ** 2;
            if (er > err_max) err_max = er;
            got++;
          end
        end
      end
    join
    chk(t_first - t_in == lat, $sformatf("N=%0d latency %0d expected %0d", n, t_first - t_in, lat));
    chk(t_last - t_first == n - 1, $sformatf("N=%0d outputs not back to back", n));
    chk(err_max < 1.0e-6, $sformatf("N=%0d squared error vs DFT %g", n, err_max));
    // wait for the control unit to finish the frame
    while ((n == 64) ? b64 : b256) @(negedge clk);
  endtask

  initial begin
    v64 = 0; v256 = 0; in64 = '0; in256 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(64, 64 + 16 + 4 + 9);
    frame(64, 64 + 16 + 4 + 9);
    frame(256, 256 + 64 + 16 + 4 + 12);
    frame(256, 256 + 64 + 16 + 4 + 12);
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
