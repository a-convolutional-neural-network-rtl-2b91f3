// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full and empty flags, and that nothing is lost at the limits.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .full,
                                         .rd_en, .rd_data, .empty);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_full = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      logic do_w, do_r;
      #1;
      checks++;
      if (full != (model.size() == DEPTH) || empty != (model.size() == 0)) begin
        failures++; $display("flags: full=%0d empty=%0d size=%0d", full, empty, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("data %h != %h", rd_data, model[0]); end
      end
      if (full) n_full++;
      // bias phases toward filling and toward draining
      do_w = (($urandom % 100) < ((t / 300) % 2 != 0 ? 75 : 30)) && model.size() < DEPTH;
      do_r = (($urandom % 100) < ((t / 300) % 2 != 0 ? 30 : 75)) && model.size() > 0;
      wr_en <= do_w; rd_en <= do_r; wr_data <= W'($urandom);
      @(posedge clk);
      if (do_r) void'(model.pop_front());
      if (do_w) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
