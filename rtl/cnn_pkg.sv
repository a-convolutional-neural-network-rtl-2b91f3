// cnn_pkg: types and constants shared by the accelerator.
//
// The 32-bit instruction follows the field widths of the instruction format:
// a 4-bit operation type, a 7-bit feature map size, a 9-bit input channel
// count, a 9-bit filter (output channel) count, then three 1-bit flags for
// filter size, padding ("fill") and stride ("step"). Placing the type in the
// most significant bits, the meaning of each 1-bit flag and the operation
// codes are this design's own choices:
//   ksize  0 -> 3x3 kernel, 1 -> 5x5 kernel
//   pad    0 -> no padding, 1 -> (K-1)/2 zero pixels on every side
//   stride 0 -> step 1,     1 -> step 2
// Operation codes: bits [1:0] pick the activation, bit [3] reverses the data
// direction (read the feature map cache RAMs, write the feature map RAMs).
package cnn_pkg;

  localparam int unsigned DATA_W   = 8;   // feature map and parameter width
  localparam int unsigned PROD_W   = 16;  // multiplier output width
  localparam int unsigned NBANK    = 3;   // parallel channels / RAM banks
  localparam int unsigned KMAX     = 5;   // largest kernel side
  localparam int unsigned KK_MAX   = KMAX * KMAX;
  localparam int unsigned ACT_FRAC = 4;   // fraction bits of 8-bit activations
  localparam int unsigned W_FRAC   = 6;   // fraction bits of 8-bit weights

  typedef enum logic [3:0] {
    OP_NOP          = 4'h0,
    OP_CONV         = 4'h1,  // convolution, no activation
    OP_CONV_HSIG    = 4'h2,  // convolution + Hard-Sigmoid
    OP_CONV_HSWISH  = 4'h3,  // convolution + Hard-Swish
    OP_CONV_R       = 4'h9,  // same three, FMC-RAM -> FM-RAM direction
    OP_CONV_HSIG_R  = 4'hA,
    OP_CONV_HSWISH_R= 4'hB
  } op_e;

  typedef enum logic [1:0] {
    ACT_NONE  = 2'd0,
    ACT_HSIG  = 2'd1,
    ACT_HSWISH= 2'd2
  } act_e;

  typedef struct packed {
    logic [3:0] op;
    logic [6:0] fm_size;
    logic [8:0] in_ch;
    logic [8:0] filters;
    logic       ksize;
    logic       pad;
    logic       stride;
  } instr_t;

  // Decoded instruction with the derived numbers the engine needs.
  typedef struct packed {
    logic        valid_op;   // a convolution operation code
    logic        reverse;    // FMC-RAM -> FM-RAM
    act_e        act;
    logic [6:0]  fm_size;    // N
    logic [8:0]  in_ch;      // C
    logic [8:0]  filters;    // F
    logic [2:0]  k;          // 3 or 5
    logic [4:0]  kk;         // 9 or 25
    logic [1:0]  pad;        // 0, 1 or 2
    logic [1:0]  stride;     // 1 or 2
    logic [7:0]  out_size;   // (N + 2P - K) / S + 1
  } dec_t;

endpackage
