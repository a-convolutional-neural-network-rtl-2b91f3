// mult_array: the parallel multiplier array of one convolution channel.
//
// N signed 8-bit x 8-bit multipliers (25 for a 5x5 kernel, each mapping to
// one DSP slice) multiply lane i of the feature map word by lane i of the
// parameter word. The 16-bit products are registered, so they appear one
// clock cycle after in_valid, with out_valid. The array size, the 8-bit
// inputs, the 16-bit outputs and the one-cycle delay follow the document;
// treating both operands as two's complement is this design's choice.
module mult_array #(
  parameter int unsigned N  = 25,
  parameter int unsigned DW = 8,
  parameter int unsigned PW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [N*DW-1:0]   fm,
  input  logic [N*DW-1:0]   wt,
  output logic              out_valid,
  output logic [N*PW-1:0]   prod
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prod      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < int'(N); i++)
          prod[i*PW +: PW] <= PW'($signed(fm[i*DW +: DW])) * PW'($signed(wt[i*DW +: DW]));
      end
    end
  end

endmodule
