// conv_unit: one of the three parallel convolution channels.
//
// Feature map bytes and parameter bytes arrive serially, each stream into its
// own parallel data module. Every complete K*K word goes into a FIFO. When
// both FIFOs hold a word, both are read together into the multiplier array
// (one cycle) and the products into the accumulator (one more cycle), which
// delivers the kernel's dot product as `result` with result_valid.
//
// Timing: the result of a window appears 5 cycles after its last byte
// (pack, FIFO write, FIFO read into the multipliers, products, sum), and a
// new window may follow without a gap. The structure follows the document's
// convolution module; the FIFO depth is this design's choice.
module conv_unit #(
  parameter int unsigned NUM        = 25,
  parameter int unsigned DW         = 8,
  parameter int unsigned PW         = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned AW         = PW + $clog2(NUM)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(NUM+1)-1:0]  count,
  input  logic                      fm_valid,
  input  logic [DW-1:0]             fm_data,
  output logic                      fm_ready,
  input  logic                      wt_valid,
  input  logic [DW-1:0]             wt_data,
  output logic                      wt_ready,
  output logic                      result_valid,
  output logic signed [AW-1:0]      result
);

  logic              fm_push, wt_push, fm_full, wt_full, fm_empty, wt_empty;
  logic [NUM*DW-1:0] fm_word, wt_word, fm_head, wt_head;
  logic              pop, prod_valid;
  logic [NUM*PW-1:0] prod;

  parallel_data #(.DW(DW), .NUM(NUM)) u_pd_fm (
    .clk, .rst_n, .count,
    .data_valid(fm_valid), .data(fm_data), .ready(fm_ready),
    .fifo_full(fm_full), .parallel_data_valid(fm_push), .par_data(fm_word),
    .cnt_data(), .data_full_flag());

  parallel_data #(.DW(DW), .NUM(NUM)) u_pd_wt (
    .clk, .rst_n, .count,
    .data_valid(wt_valid), .data(wt_data), .ready(wt_ready),
    .fifo_full(wt_full), .parallel_data_valid(wt_push), .par_data(wt_word),
    .cnt_data(), .data_full_flag());

  sync_fifo #(.W(NUM*DW), .DEPTH(FIFO_DEPTH)) u_fifo_fm (
    .clk, .rst_n, .wr_en(fm_push), .wr_data(fm_word), .full(fm_full),
    .rd_en(pop), .rd_data(fm_head), .empty(fm_empty));

  sync_fifo #(.W(NUM*DW), .DEPTH(FIFO_DEPTH)) u_fifo_wt (
    .clk, .rst_n, .wr_en(wt_push), .wr_data(wt_word), .full(wt_full),
    .rd_en(pop), .rd_data(wt_head), .empty(wt_empty));

  assign pop = !fm_empty && !wt_empty;

  mult_array #(.N(NUM), .DW(DW), .PW(PW)) u_mult (
    .clk, .rst_n, .in_valid(pop), .fm(fm_head), .wt(wt_head),
    .out_valid(prod_valid), .prod);

  accumulator #(.N(NUM), .PW(PW), .AW(AW)) u_acc (
    .clk, .rst_n, .in_valid(prod_valid), .data(prod),
    .out_valid(result_valid), .result);

endmodule
