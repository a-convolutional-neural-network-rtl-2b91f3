// activation_unit: activation function calculation module.
//
// Applies no activation, Hard-Sigmoid or Hard-Swish to a stream of 8-bit
// fixed-point values, chosen by `mode`. Both function pipelines run on every
// sample; the output is taken from the one selected. All three paths are
// aligned to the 3-cycle Hard-Swish latency, so in_valid to out_valid is
// always 3 cycles and `mode` must be held while samples are in flight. The two
// functions follow the document; the pass-through mode and the alignment are
// this design's choices.
module activation_unit
  import cnn_pkg::*;
#(
  parameter int unsigned DW   = 8,
  parameter int unsigned FRAC = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  act_e                 mode,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 out_valid,
  output logic signed [DW-1:0] y
);

  logic                 sw_v, sg_v;
  logic signed [DW-1:0] sw_y, sg_y, sg_y_d;
  logic signed [DW-1:0] x_d [3];
  logic                 v_d [3];

  hard_swish #(.DW(DW), .FRAC(FRAC)) u_swish (
    .clk, .rst_n, .in_valid, .x, .out_valid(sw_v), .y(sw_y));

  hard_sigmoid #(.DW(DW), .FRAC(FRAC)) u_sigmoid (
    .clk, .rst_n, .in_valid, .x, .out_valid(sg_v), .y(sg_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sg_y_d <= '0;
      for (int i = 0; i < 3; i++) begin
        x_d[i] <= '0;
        v_d[i] <= 1'b0;
      end
    end else begin
      sg_y_d <= sg_y;
      x_d[0] <= x;
      v_d[0] <= in_valid;
      for (int i = 1; i < 3; i++) begin
        x_d[i] <= x_d[i-1];
        v_d[i] <= v_d[i-1];
      end
    end
  end

  assign out_valid = v_d[2];

  // The function pipelines and the alignment chain must agree on timing.
  assert property (@(posedge clk) disable iff (!rst_n) sw_v == v_d[2]);
  assert property (@(posedge clk) disable iff (!rst_n) sg_v == v_d[1]);

  always_comb begin
    unique case (mode)
      ACT_HSIG:   y = sg_y_d;
      ACT_HSWISH: y = sw_y;
      default:    y = x_d[2];
    endcase
  end

endmodule
