// dp_bram: true dual-port on-chip RAM (FPGA block RAM).
//
// Two independent ports, each able to read or write one word per clock.
// A read returns the word one cycle after en (read-first when the same port
// writes). Addresses at or beyond DEPTH are ignored on write and read as 0.
// The accelerator builds its feature map RAMs (3 x 102400 x 8 bit), parameter
// RAM (20480 x 8 bit) and feature map cache RAMs (3 x 53248 x 8 bit) from it;
// the depths and widths are the document's, the port behaviour is this
// design's. The contents are not reset.
module dp_bram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 102400,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= (int'(a_addr) < int'(DEPTH)) ? mem[a_addr] : '0;
      if (a_we && int'(a_addr) < int'(DEPTH)) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= (int'(b_addr) < int'(DEPTH)) ? mem[b_addr] : '0;
      if (b_we && int'(b_addr) < int'(DEPTH)) mem[b_addr] <= b_wdata;
    end
  end

endmodule
