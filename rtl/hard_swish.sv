// hard_swish: Hard-Swish activation on 8-bit fixed-point data.
//
//   y = 0                 for x <= -A
//   y = x                 for x >=  A
//   y = (x*x + A*x) / B   otherwise, with A = 3 and B = 6
//
// Three pipeline stages as in the document's schedule: cycle 1 forms x*x and
// A*x with two multipliers, cycle 2 adds them, cycle 3 divides by B (and
// picks the clamped value outside [-A, A]). in_valid to out_valid is 3 cycles,
// one sample per cycle. The values A = 3, B = 6 are those of the standard
// Hard-Swish definition. Data is two's complement with FRAC fraction bits
// (default 4), so the divisor in stage 3 is B * 2^FRAC; the quotient is
// rounded to nearest, ties away from zero. Fixed-point format and rounding
// are this design's choices.
module hard_swish #(
  parameter int unsigned DW   = 8,
  parameter int unsigned FRAC = 4,
  parameter int          A    = 3,
  parameter int          B    = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 out_valid,
  output logic signed [DW-1:0] y
);

  localparam int signed A_FX = A * (2 ** FRAC);   // A in the data format
  localparam int signed DIV  = B * (2 ** FRAC);   // removes B and one FRAC

  logic signed [2*DW+3:0] sq1, ax1, sum2;
  logic signed [DW-1:0]   x1, x2;
  logic                   v1, v2;
  logic signed [2*DW+5:0] num;
  logic signed [2*DW+3:0] xe;      // x widened before multiplying

  assign xe  = (2*DW+4)'(x);

  assign num = 2 * (2*DW+6)'(sum2) + ((sum2 >= 0) ? (2*DW+6)'(DIV) : -(2*DW+6)'(DIV));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, out_valid} <= '0;
      {sq1, ax1, sum2}    <= '0;
      {x1, x2, y}         <= '0;
    end else begin
      // cycle 1: x*x and A*x
      v1  <= in_valid;
      x1  <= x;
      sq1 <= xe * xe;
      ax1 <= xe * (2*DW+4)'(A_FX);
      // cycle 2: x^2 + A*x
      v2   <= v1;
      x2   <= x1;
      sum2 <= sq1 + ax1;
      // cycle 3: divide by B, clamp outside [-A, A]
      out_valid <= v2;
      if (int'(x2) <= -A_FX)     y <= '0;
      else if (int'(x2) >= A_FX) y <= x2;
      else                       y <= DW'(num / (2 * DIV));
    end
  end

endmodule
