// tb_hard_sigmoid: sweeps all 256 input codes through the Hard-Sigmoid pipeline, one per
// cycle, and compares each output with the real-valued definition rounded to
// the 4-fraction-bit format. Checks the 2-cycle latency and counts inputs
// in the three regions (below -3, inside, above 3).
module tb_hard_sigmoid;
  import conv_ref_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] x, y;
  int checks = 0, failures = 0;
  int sent[$];
  int n_low = 0, n_mid = 0, n_high = 0;

  hard_sigmoid dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the output of input i must appear LAT edges after it was sampled
  logic        v_pipe [LAT+1];
  int          x_pipe [LAT+1];
  always @(posedge clk) begin
    for (int i = LAT; i > 0; i--) begin
      v_pipe[i] <= v_pipe[i-1];
      x_pipe[i] <= x_pipe[i-1];
    end
    v_pipe[0] <= in_valid;
    x_pipe[0] <= int'(x);
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != v_pipe[LAT-1]) begin
      failures++; $display("out_valid timing wrong");
    end else if (out_valid) begin
      int e;
      e = ref_hsigmoid(x_pipe[LAT-1]);
      checks++;
      if (int'(y) != e) begin
        failures++; $display("x=%0d y=%0d expected %0d", x_pipe[LAT-1], y, e);
      end
      if (x_pipe[LAT-1] <= -48) n_low++;
      else if (x_pipe[LAT-1] >= 48) n_high++;
      else n_mid++;
    end
  end

  initial begin
    for (int i = 0; i <= LAT; i++) begin v_pipe[i] = 0; x_pipe[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = -128; i < 128; i++) begin
      in_valid <= 1;
      x <= 8'(i);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_low == 0 || n_mid == 0 || n_high == 0) begin
      failures++; $display("region not covered %0d %0d %0d", n_low, n_mid, n_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
