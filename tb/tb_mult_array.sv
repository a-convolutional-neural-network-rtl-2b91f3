// tb_mult_array: random and extreme operands; every product must appear,
// exact and sign-correct, one cycle after in_valid.
module tb_mult_array;
  localparam int N = 25;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N*8-1:0] fm, wt;
  logic [N*16-1:0] prod;
  int checks = 0, failures = 0;

  mult_array #(.N(N)) dut (.clk, .rst_n, .in_valid, .fm, .wt, .out_valid, .prod);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      int a[N], b[N];
      for (int i = 0; i < N; i++) begin
        a[i] = (t < 4) ? ((t % 2 != 0) ? -128 : 127) : int'($urandom_range(0, 255)) - 128;
        b[i] = (t < 4) ? ((t / 2 != 0) ? -128 : 127) : int'($urandom_range(0, 255)) - 128;
        fm[i*8 +: 8] <= 8'(a[i]);
        wt[i*8 +: 8] <= 8'(b[i]);
      end
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'($signed(prod[i*16 +: 16])) != a[i] * b[i]) begin
          failures++; $display("lane %0d: %0d*%0d gave %0d", i, a[i], b[i], $signed(prod[i*16 +: 16]));
        end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
