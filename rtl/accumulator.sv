// accumulator: adder chain that sums the products of one kernel.
//
// The first adder takes the first two products; every following adder takes
// the previous adder's result and one new product, so N products pass through
// N-1 adders in a row. The sum is captured in an output register, so it
// appears one clock cycle after in_valid, with out_valid. This chain and the
// output register follow the document. The chain is combinational within the
// cycle, and the output width (product width plus enough bits that 25 products
// cannot overflow) is this design's choice.
module accumulator #(
  parameter int unsigned N  = 25,
  parameter int unsigned PW = 16,
  parameter int unsigned AW = PW + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N*PW-1:0]     data,
  output logic                out_valid,
  output logic signed [AW-1:0] result
);

  logic signed [AW-1:0] chain [N];

  always_comb begin
    chain[0] = AW'($signed(data[0 +: PW]));
    for (int i = 1; i < int'(N); i++)
      chain[i] = chain[i-1] + AW'($signed(data[i*PW +: PW]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= chain[N-1];
    end
  end

endmodule
