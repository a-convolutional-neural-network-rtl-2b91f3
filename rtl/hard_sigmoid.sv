// hard_sigmoid: Hard-Sigmoid activation on 8-bit fixed-point data.
//
//   y = 0             for x <= -A
//   y = 1             for x >=  A
//   y = (x + A) / B   otherwise, with A = 3 and B = 6
//
// Two pipeline stages as in the document's schedule: cycle 1 adds A to x,
// cycle 2 divides by B (and picks the clamped value outside [-A, A]).
// in_valid to out_valid is 2 cycles, one sample per cycle. A = 3, B = 6 are
// the standard Hard-Sigmoid constants. Data is two's complement with FRAC
// fraction bits (default 4, so 1.0 is 16); the quotient is rounded to
// nearest, ties up. Format and rounding are this design's choices.
module hard_sigmoid #(
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

  localparam int signed A_FX = A * (2 ** FRAC);
  localparam int signed ONE  = 2 ** FRAC;

  logic signed [DW+1:0] t1;   // x + A
  logic signed [DW-1:0] x1;
  logic                 v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, out_valid} <= '0;
      t1 <= '0;
      x1 <= '0;
      y  <= '0;
    end else begin
      // cycle 1: A + x
      v1 <= in_valid;
      x1 <= x;
      t1 <= (DW+2)'(x) + (DW+2)'(A_FX);
      // cycle 2: divide by B, clamp to [0, 1]
      out_valid <= v1;
      if (int'(x1) <= -A_FX)     y <= '0;
      else if (int'(x1) >= A_FX) y <= DW'(ONE);
      else                       y <= DW'((2 * int'(t1) + B) / (2 * B));
    end
  end

endmodule
