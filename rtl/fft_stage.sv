// One stage of the pipelined radix-4 decimation-in-frequency FFT.
//
// A stage works on blocks of M samples (M = N at the first stage and a
// quarter of the previous stage's M at each later one). It contains:
//  * a memory selector that writes the incoming samples, one per clock,
//    into Memory-1 until M have arrived and then switches to Memory-2, and
//    back again (ping-pong);
//  * the two memories of M complex words;
//  * a sequencer that, as soon as a memory is full, reads it out in the
//    order of the stage's outputs: output position p = k*(M/4) + n (k =
//    0..3, n = 0..M/4-1) needs the four words n, n+M/4, n+M/2, n+3M/4,
//    which are read in one clock;
//  * a twiddle factor register that holds W_M^(n*k) = W_N^(n*k*N/M),
//    fetched from the shared twiddle generator with tw_addr;
//  * the radix-4 butterfly (r4_butterfly), which gives output y_k * W.
// Each block therefore leaves the stage in place (output p lands at
// position p of the block), so after all stages the FFT result is in
// base-4 digit-reversed order.
//
// Timing: with one input per clock the first output of a block appears
// M + 3 clocks after its first input, and outputs then follow one per clock
// for M clocks, while the next block is being written into the other
// memory. Inputs may also arrive with gaps; reading runs at one word per
// clock regardless. en freezes the whole stage (the document disables
// stages that have no data by clock gating); an input arriving while en
// is low is an error.
//
// The partition into memory selector, two memories, sequencer, twiddle
// register and butterfly follows the document; the read order, the
// multi-port reads and the pipeline depth are this design's choices.
module fft_stage
  import cfd_pkg::*;
#(
  parameter int unsigned N = 4096,   // FFT size (for twiddle indexing)
  parameter int unsigned M = 4096    // block size of this stage
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  cplx_t                din,
  output logic [$clog2(N)-1:0] tw_addr,
  input  cplx_t                tw_data,
  output logic                 out_valid,
  output cplx_t                dout
);

  localparam int unsigned AW = $clog2(M);
  localparam int unsigned Q  = M / 4;           // quarter block
  localparam int unsigned QIW = (Q > 1) ? $clog2(Q) : 1;
  localparam int unsigned TW_STEP = N / M;

  // Memory-1 and Memory-2.
  cplx_t mem [2][M];

  // Memory selector state.
  logic          wbank;
  logic [AW-1:0] wcnt;

  // Sequencer state.
  logic          rd_active;
  logic          rbank;
  logic [AW-1:0] rcnt;
  logic [1:0]    rk;
  logic [QIW-1:0] rn;

  // Registered memory words and twiddle factor register.
  cplx_t      a_q [4];
  logic [1:0] k_q;
  logic       a_valid;
  cplx_t      tw_q;

  always_comb begin
    rk = rcnt[AW-1 -: 2];
    rn = (Q > 1) ? QIW'(rcnt) : '0;
    tw_addr = $clog2(N)'(int'(rn) * int'(rk) * int'(TW_STEP));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      wcnt      <= '0;
      rd_active <= 1'b0;
      rbank     <= 1'b0;
      rcnt      <= '0;
      a_valid   <= 1'b0;
      k_q       <= '0;
      tw_q      <= '0;
      for (int i = 0; i < 4; i++) a_q[i] <= '0;
    end else if (en) begin
      // Memory selector: fill one memory, then hand it to the sequencer.
      if (in_valid) begin
        mem[wbank][wcnt] <= din;
        wcnt <= wcnt + 1'b1;
        if (int'(wcnt) == int'(M) - 1) begin
          wbank <= ~wbank;
        end
      end

      // Sequencer: read four words per clock from the full memory.
      a_valid <= rd_active;
      if (rd_active) begin
        for (int i = 0; i < 4; i++)
          a_q[i] <= mem[rbank][AW'(int'(rn) + i * int'(Q))];
        k_q  <= rk;
        tw_q <= tw_data;
        rcnt <= rcnt + 1'b1;
      end

      if (in_valid && int'(wcnt) == int'(M) - 1) begin
        rd_active <= 1'b1;
        rbank     <= wbank;
        rcnt      <= '0;
      end else if (rd_active && int'(rcnt) == int'(M) - 1) begin
        rd_active <= 1'b0;
      end
    end
  end

  r4_butterfly u_bfly (
    .clk, .rst_n, .en,
    .in_valid  (a_valid),
    .a         (a_q),
    .k         (k_q),
    .tw        (tw_q),
    .out_valid,
    .dout
  );

  // A sample offered to a disabled stage would be lost.
  always_ff @(posedge clk)
    if (rst_n) assert (!(in_valid && !en))
      else $error("fft_stage M=%0d: input while disabled", M);

endmodule
