// FFT control unit: produces the stage enables en_st[0..STAGES-1] and the
// twiddle generator enable en_tf.
//
// A frame is N samples presented to the first stage on consecutive clocks.
// The first sample of a frame (start) launches a cycle counter t. Stage s
// receives its first sample at T_s = sum_{i<s} (M_i + 3), where M_i = N/4^i
// is the block size of stage i and 3 is a stage's pipeline depth, and
// delivers its last output at T_s + M_s + 3 + N - 1. en_st[s] is high for
// that interval (plus one clock of margin) and low otherwise, so a stage
// is switched on only while it holds data; en_tf is high while any stage
// is on. busy stays high until the last stage has emitted its last output;
// done pulses for one clock then. A start while busy is ignored, so
// frames do not overlap.
//
// The document names this unit and its outputs (en_st1 .. en_st6, en_tf)
// but not its logic; the counter windows are this design's choice and
// depend on a frame arriving without gaps.
module fft_ctrl #(
  parameter int unsigned N      = 4096,
  parameter int unsigned STAGES = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [STAGES-1:0] en_st,
  output logic              en_tf,
  output logic              busy,
  output logic              done
);

  localparam int unsigned SLAT = 3;   // pipeline depth of one stage

  function automatic int unsigned t_first(int unsigned s);
    int unsigned t;
    t = 0;
    for (int unsigned i = 0; i < s; i++) t += (N >> (2 * i)) + SLAT;
    return t;
  endfunction

  localparam int unsigned T_END = t_first(STAGES) + N;  // last output + 1
  localparam int unsigned CW    = $clog2(T_END + 2);

  logic [CW-1:0] cnt;
  logic [CW-1:0] t;
  logic          run;

  assign run = busy || start;
  assign t   = busy ? cnt : '0;

  always_comb begin
    for (int unsigned s = 0; s < STAGES; s++) begin
      en_st[s] = run
              && int'(t) >= int'(t_first(s))
              && int'(t) <  int'(t_first(s + 1) + N + 1);
    end
    en_tf = |en_st;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= CW'(1);
        end
      end else if (int'(cnt) == int'(T_END)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
