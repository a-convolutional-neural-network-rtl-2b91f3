// instr_decoder: splits the 32-bit accelerator instruction into its fields
// and derives the numbers the calculation engine needs.
//
// Field layout (MSB first): type[31:28], feature map size[27:21], input
// channels[20:12], filters[11:3], filter size[2], padding[1], stride[0]. The
// field widths follow the document's instruction format; the bit order, the
// flag meanings and the operation codes are this design's (see cnn_pkg).
// Derived values: K (3 or 5), K*K, padding P (0 or (K-1)/2), stride S
// (1 or 2), and the output size (N + 2P - K) / S + 1. `valid` is low for a
// type that is not a convolution or for a map smaller than the kernel.
// Purely combinational.
module instr_decoder
  import cnn_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec,
  output logic        valid
);

  instr_t     f;
  logic [8:0] span;   // N + 2P - K, one bit wider to catch a negative result
  logic [8:0] padded;

  assign f = instr_t'(instr);

  always_comb begin
    dec          = '0;
    dec.fm_size  = f.fm_size;
    dec.in_ch    = f.in_ch;
    dec.filters  = f.filters;
    dec.k        = f.ksize ? 3'd5 : 3'd3;
    dec.kk       = f.ksize ? 5'd25 : 5'd9;
    dec.pad      = f.pad ? (f.ksize ? 2'd2 : 2'd1) : 2'd0;
    dec.stride   = f.stride ? 2'd2 : 2'd1;
    dec.reverse  = f.op[3];
    unique case (f.op)
      OP_CONV,        OP_CONV_R:        begin dec.valid_op = 1'b1; dec.act = ACT_NONE;   end
      OP_CONV_HSIG,   OP_CONV_HSIG_R:   begin dec.valid_op = 1'b1; dec.act = ACT_HSIG;   end
      OP_CONV_HSWISH, OP_CONV_HSWISH_R: begin dec.valid_op = 1'b1; dec.act = ACT_HSWISH; end
      default:                          begin dec.valid_op = 1'b0; dec.act = ACT_NONE;   end
    endcase
    padded = 9'(f.fm_size) + 9'({dec.pad, 1'b0});
    span   = padded - 9'(dec.k);
    if (padded < 9'(dec.k))
      dec.out_size = '0;
    else
      dec.out_size = f.stride ? 8'(span >> 1) + 8'd1 : 8'(span) + 8'd1;
    valid = dec.valid_op && (dec.out_size != 0) && (f.in_ch != 0) && (f.filters != 0);
  end

endmodule
