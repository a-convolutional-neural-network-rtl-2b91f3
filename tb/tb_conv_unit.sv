// tb_conv_unit: streams random 3x3 and 5x5 windows and weights into one
// convolution channel, with weights arriving later than, or at the same time
// as, the pixels. Each result must equal the dot product and appear 5 cycles
// after the later of the two last bytes.
module tb_conv_unit;
  localparam int NUM = 25;
  logic clk = 0, rst_n = 0;
  logic [$clog2(NUM+1)-1:0] count;
  logic fm_valid = 0, wt_valid = 0, fm_ready, wt_ready, result_valid;
  logic [7:0] fm_data, wt_data;
  logic signed [20:0] result;
  int checks = 0, failures = 0;
  int cycle = 0;

  conv_unit #(.NUM(NUM)) dut (.clk, .rst_n, .count, .fm_valid, .fm_data, .fm_ready,
                              .wt_valid, .wt_data, .wt_ready, .result_valid, .result);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expq[$], dueq[$];
  int got = 0;

  always @(posedge clk) if (rst_n && result_valid) begin
    checks += 2;
    if (expq.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      int e, d;
      e = expq.pop_front();
      d = dueq.pop_front();
      if (int'(result) != e) begin failures++; $display("result %0d expected %0d", result, e); end
      if (cycle != d) begin failures++; $display("result at cycle %0d expected %0d", cycle, d); end
    end
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 60; w++) begin
      int n, lag, s, last;
      int a[], b[];
      n   = (w < 30) ? 9 : 25;
      lag = (w % 3 == 0) ? 0 : n;   // weights with the pixels, or after them
      s   = 0;
      a = new[n]; b = new[n];
      count <= ($clog2(NUM+1))'(n);
      for (int i = 0; i < n; i++) begin
        a[i] = int'($urandom_range(0, 255)) - 128;
        b[i] = int'($urandom_range(0, 255)) - 128;
        s += a[i] * b[i];
      end
      for (int t = 0; t < n + lag; t++) begin
        fm_valid <= (t < n);
        fm_data  <= (t < n) ? 8'(a[t]) : 8'd0;
        wt_valid <= (t >= lag);
        wt_data  <= (t >= lag) ? 8'(b[t - lag]) : 8'd0;
        @(posedge clk);
      end
      // the last byte was sampled at edge number `cycle`
      last = cycle;
      expq.push_back(s);
      dueq.push_back(last + 5);
      if (w % 5 == 4) begin
        fm_valid <= 0; wt_valid <= 0;
        repeat (7) @(posedge clk);
      end
    end
    fm_valid <= 0; wt_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (got != 60) begin failures++; $display("got %0d results", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
