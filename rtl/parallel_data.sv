// parallel_data: serial-to-parallel converter for one convolution kernel.
//
// Bytes read serially from a RAM arrive with data_valid and are shifted into
// a register: each new byte enters at the top and the older ones move down
// one lane, as in a plain shift register. When `count` bytes (the kernel
// size K*K, 9 or 25) have been collected, the word is handed to the FIFO
// that follows. The word is presented aligned so that the first byte received
// is in lane 0 (bits [7:0]) and byte i in lane i; unused lanes are zero.
//
// Interface and timing:
//   data_valid/data     one byte per cycle when ready is high
//   ready               low while a complete word waits for room in the FIFO
//   parallel_data_valid one-cycle push into the FIFO; it is raised in the
//                       cycle after the last byte, or later if fifo_full
//   data_full_flag      a complete word is held
//   cnt_data            bytes collected for the current word
// A byte may arrive in the same cycle as the push; it starts the next word.
// Shifting and the hand-over to a FIFO follow the document; holding a full
// word while the FIFO is full, and the lane alignment, are this design's.
module parallel_data #(
  parameter int unsigned DW  = 8,
  parameter int unsigned NUM = 25   // largest kernel, K*K
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NUM+1)-1:0] count,
  input  logic                     data_valid,
  input  logic [DW-1:0]            data,
  output logic                     ready,
  input  logic                     fifo_full,
  output logic                     parallel_data_valid,
  output logic [NUM*DW-1:0]        par_data,
  output logic [$clog2(NUM+1)-1:0] cnt_data,
  output logic                     data_full_flag
);

  logic [NUM*DW-1:0] sreg;
  logic              accept, push;

  assign push                = data_full_flag && !fifo_full;
  assign ready               = !data_full_flag || !fifo_full;
  assign accept              = data_valid && ready;
  assign parallel_data_valid = push;
  // The newest byte is at the top lane; shift down so byte 0 is in lane 0.
  assign par_data       = sreg >> (DW * (NUM - int'(count)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg           <= '0;
      cnt_data       <= '0;
      data_full_flag <= 1'b0;
    end else begin
      if (accept)
        sreg <= {data, sreg[NUM*DW-1:DW]};
      if (push) begin
        data_full_flag <= 1'b0;
        cnt_data       <= accept ? 1 : 0;
        if (accept && count == 1) data_full_flag <= 1'b1;
      end else if (accept) begin
        cnt_data <= cnt_data + 1'b1;
        if (cnt_data + 1'b1 == count) data_full_flag <= 1'b1;
      end
    end
  end

  // The source must not offer a byte while a held word blocks the register.
  assert property (@(posedge clk) disable iff (!rst_n) data_valid |-> ready);

endmodule
