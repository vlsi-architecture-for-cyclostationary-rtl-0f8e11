// Test-statistic computing unit.
//
// From the three MAC results A = E[X^2], B = E[XY], D = E[Y^2] and the
// selected bin F(alpha) = X + jY it computes
//     T = (X^2*D + Y^2*A - 2*X*Y*B) / (A*D - B^2),
// i.e. r * inverse(phi) * r^T for r = [X Y] and phi = [[A B] [B D]].
// The datapath has eight multipliers, two adders, two subtractors and one
// divider:
//   step 1: X*X, Y*Y, (X+X)*Y, A*D, B*B             (5 multipliers, 1 adder)
//   step 2: X^2*D, Y^2*A, 2XY*B, A*D - B*B          (3 multipliers, 1 subtractor)
//   step 3: X^2*D + Y^2*A - 2XY*B                   (1 adder, 1 subtractor)
//   step 4: numerator / denominator                 (divider)
// All products are kept at full width, so no precision is lost before the
// division: the numerator is Q50.48 (99 bits), the denominator Q32.32 (65
// bits), and the quotient comes out in Q47.16, saturated to 64 bits. The
// divider is a restoring divider that produces one quotient bit per clock
// on the magnitudes, then applies the sign (rounding toward zero). A zero
// denominator gives the largest positive value.
//
// Timing: start is sampled with the inputs; valid pulses with the result
// NUMW + 6 = 105 clocks later; busy is high in between, and start is
// ignored while busy.
//
// The operator count and the formula follow the document (the denominator
// is the determinant A*D - B^2 of phi); the widths, the step registers and
// the bit-serial divider are this design's choices.
module test_stat_unit
  import cfd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  q_t                 a,       // E[X^2]
  input  q_t                 b,       // E[XY]
  input  q_t                 d,       // E[Y^2]
  input  cplx_t              f,       // F(alpha)
  output logic               busy,
  output logic               valid,
  output logic signed [63:0] t_stat
);

  localparam int unsigned NUMW = 99;
  localparam int unsigned DENW = 65;

  typedef enum logic [2:0] {S_IDLE, S_MUL1, S_MUL2, S_SUM, S_LOAD, S_DIV, S_OUT} state_t;
  state_t state;

  q_t a_q, b_q, d_q, x_q, y_q;

  logic signed [63:0]     xx, yy, ad, bb;
  logic signed [64:0]     x2y;
  logic signed [95:0]     n1, n2;
  logic signed [96:0]     n3;
  logic signed [DENW-1:0] den;
  logic signed [NUMW-1:0] num;

  // Divider state.
  logic [NUMW-1:0]  dvd;      // |numerator|, shifted out MSB first
  logic [DENW-1:0]  dvs;      // |denominator|
  logic [DENW:0]    rem;
  logic [NUMW-1:0]  quo;
  logic             neg;
  logic [6:0]       bitcnt;
  logic [DENW:0]    rem_sh;

  assign rem_sh = {rem[DENW-1:0], dvd[NUMW-1]};
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      valid  <= 1'b0;
      t_stat <= '0;
      {a_q, b_q, d_q, x_q, y_q} <= '0;
      {xx, yy, ad, bb, x2y} <= '0;
      {n1, n2, n3, den, num} <= '0;
      {dvd, dvs, rem, quo, neg, bitcnt} <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q <= a; b_q <= b; d_q <= d;
          x_q <= f.re; y_q <= f.im;
          state <= S_MUL1;
        end
        S_MUL1: begin
          xx  <= x_q * x_q;
          yy  <= y_q * y_q;
          x2y <= (65'(x_q) + 65'(x_q)) * 65'(y_q);
          ad  <= a_q * d_q;
          bb  <= b_q * b_q;
          state <= S_MUL2;
        end
        S_MUL2: begin
          n1  <= 96'(xx) * 96'(d_q);
          n2  <= 96'(yy) * 96'(a_q);
          n3  <= 97'(x2y) * 97'(b_q);
          den <= 65'(ad) - 65'(bb);
          state <= S_SUM;
        end
        S_SUM: begin
          num   <= 99'(n1) + 99'(n2) - 99'(n3);
          state <= S_LOAD;
        end
        S_LOAD: begin
          dvd    <= num[NUMW-1] ? NUMW'(-num) : NUMW'(num);
          dvs    <= den[DENW-1] ? DENW'(-den) : DENW'(den);
          neg    <= num[NUMW-1] ^ den[DENW-1];
          rem    <= '0;
          quo    <= '0;
          bitcnt <= '0;
          state  <= S_DIV;
        end
        S_DIV: begin
          if (rem_sh >= {1'b0, dvs}) begin
            rem <= rem_sh - {1'b0, dvs};
            quo <= {quo[NUMW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[NUMW-2:0], 1'b0};
          end
          dvd    <= dvd << 1;
          bitcnt <= bitcnt + 1'b1;
          if (int'(bitcnt) == NUMW - 1) state <= S_OUT;
        end
        default: begin  // S_OUT
          if (dvs == 0)
            t_stat <= neg ? 64'sh8000_0000_0000_0000 : 64'sh7FFF_FFFF_FFFF_FFFF;
          else if (quo > NUMW'(64'h7FFF_FFFF_FFFF_FFFF))
            t_stat <= neg ? 64'sh8000_0000_0000_0001 : 64'sh7FFF_FFFF_FFFF_FFFF;
          else
            t_stat <= neg ? -$signed(quo[63:0]) : $signed(quo[63:0]);
          valid <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
