// tb_parallel_data: checks the serial-to-parallel converter for 3x3 and 5x5
// kernels: lane order of the packed word, the push one cycle after the last
// byte, holding the word while the FIFO is full, and back-to-back words.
module tb_parallel_data;
  localparam int NUM = 25;
  logic clk = 0, rst_n = 0;
  logic [$clog2(NUM+1)-1:0] count;
  logic data_valid = 0, fifo_full = 0;
  logic [7:0] data;
  logic ready, pv, full_flag;
  logic [NUM*8-1:0] pdata;
  logic [$clog2(NUM+1)-1:0] cnt;
  int checks = 0, failures = 0;

  parallel_data #(.DW(8), .NUM(NUM)) dut (
    .clk, .rst_n, .count, .data_valid, .data, .ready, .fifo_full,
    .parallel_data_valid(pv), .par_data(pdata), .cnt_data(cnt), .data_full_flag(full_flag));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte q[$];

  task automatic check_word(int n);
    checks++;
    for (int i = 0; i < NUM; i++) begin
      byte expv;
      expv = (i < n) ? q[i] : 8'd0;
      if (pdata[i*8 +: 8] !== expv) begin
        failures++;
        $display("lane %0d: got %02x expected %02x", i, pdata[i*8 +: 8], expv);
        break;
      end
    end
  endtask

  // Send n bytes; return with the last byte just clocked in.
  task automatic send(int n);
    q.delete();
    for (int i = 0; i < n; i++) begin
      byte b;
      b = byte'($urandom);
      q.push_back(b);
      data_valid <= 1; data <= b;
      @(posedge clk);
    end
    data_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 20; round++) begin
      int n;
      n = (round % 2 != 0) ? 25 : 9;
      count <= ($clog2(NUM+1))'(n);
      @(posedge clk);
      send(n);
      #1;
      // push in the cycle after the last byte
      checks++;
      if (!(pv && full_flag)) begin failures++; $display("no push after last byte"); end
      check_word(n);
      @(posedge clk); #1;
      checks++;
      if (pv || full_flag || cnt != 0) begin failures++; $display("push not single"); end
    end

    // FIFO full: the word is held until room appears, ready drops
    count <= 9;
    fifo_full <= 1;
    @(posedge clk);
    send(9);
    repeat (4) begin
      #1;
      checks++;
      if (pv || !full_flag || ready) begin failures++; $display("word not held"); end
      @(posedge clk);
    end
    fifo_full <= 0;
    #1;
    checks++;
    if (!pv) begin failures++; $display("held word not pushed"); end
    check_word(9);
    @(posedge clk);

    // back-to-back: two words with no gap
    for (int w = 0; w < 2; w++) begin
      send(9);
      #1;
      checks++;
      if (!pv) begin failures++; $display("back-to-back push missing"); end
      check_word(9);
    end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
