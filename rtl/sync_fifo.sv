// sync_fifo: single-clock first-in first-out buffer.
//
// Sits between a parallel data module and the multiplier array; it holds
// complete kernel-sized words. Depth and the show-ahead read are this design's
// choices (the document only names the FIFO). rd_data shows the oldest entry
// whenever empty is low; rd_en removes it at the clock edge. wr_en while full
// and rd_en while empty are ignored (and flagged by assertions).
module sync_fifo #(
  parameter int unsigned W     = 200,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   level;
  logic          do_wr, do_rd;

  assign full    = (level == (AW+1)'(DEPTH));
  assign empty   = (level == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
