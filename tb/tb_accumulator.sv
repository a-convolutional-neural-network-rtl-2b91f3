// tb_accumulator: random 16-bit products, including all-maximum and
// all-minimum vectors; the registered sum must be exact one cycle later.
module tb_accumulator;
  localparam int N = 25, PW = 16, AW = PW + $clog2(N);
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N*PW-1:0] data;
  logic signed [AW-1:0] result;
  int checks = 0, failures = 0;

  accumulator #(.N(N), .PW(PW)) dut (.clk, .rst_n, .in_valid, .data, .out_valid, .result);
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
    for (int t = 0; t < 500; t++) begin
      longint s;
      s = 0;
      for (int i = 0; i < N; i++) begin
        int v;
        v = (t == 0) ? 32767 : (t == 1) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
        s += longint'(v);
        data[i*PW +: PW] <= PW'(v);
      end
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid || longint'(result) != s) begin
        failures++; $display("sum %0d expected %0d (valid %0d)", result, s, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
