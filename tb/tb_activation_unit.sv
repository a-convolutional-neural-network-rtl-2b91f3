// tb_activation_unit: random inputs in each of the three modes (none,
// Hard-Sigmoid, Hard-Swish); outputs must match the definitions and arrive
// exactly 3 cycles after the input in every mode. Counts samples per mode.
module tb_activation_unit;
  import cnn_pkg::*;
  import conv_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] x, y;
  act_e mode;
  int checks = 0, failures = 0;
  int per_mode[3] = '{0, 0, 0};
  logic v_pipe [4];
  int   x_pipe [4];

  activation_unit dut (.clk, .rst_n, .mode, .in_valid, .x, .out_valid, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int i = 3; i > 0; i--) begin
      v_pipe[i] <= v_pipe[i-1];
      x_pipe[i] <= x_pipe[i-1];
    end
    v_pipe[0] <= in_valid;
    x_pipe[0] <= int'(x);
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != v_pipe[2]) begin
      failures++; $display("out_valid timing wrong");
    end else if (out_valid) begin
      int e;
      e = ref_act(x_pipe[2], int'(mode));
      checks++;
      per_mode[int'(mode)]++;
      if (int'(y) != e) begin
        failures++; $display("mode %0d x=%0d y=%0d expected %0d", mode, x_pipe[2], y, e);
      end
    end
  end

  initial begin
    for (int i = 0; i < 4; i++) begin v_pipe[i] = 0; x_pipe[i] = 0; end
    mode = ACT_NONE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 3; m++) begin
      mode <= act_e'(m);
      @(posedge clk);
      for (int i = 0; i < 400; i++) begin
        in_valid <= ($urandom % 4 != 0);
        x <= 8'($urandom);
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (5) @(posedge clk);
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (per_mode[m] == 0) begin failures++; $display("mode %0d never ran", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
