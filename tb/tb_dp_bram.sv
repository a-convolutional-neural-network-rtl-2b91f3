// tb_dp_bram: random reads and writes on both ports of a small RAM against
// an array model; checks the one-cycle read latency, read-first behaviour on
// the writing port, and that addresses beyond the depth are ignored.
module tb_dp_bram;
  localparam int DEPTH = 100, AW = 7;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr, b_addr;
  logic [7:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [7:0] model [128];
  int checks = 0, failures = 0;

  dp_bram #(.W(8), .DEPTH(DEPTH), .AW(AW)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                                .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      a_en <= 1; a_we <= 1; a_addr <= AW'(i); a_wdata <= 8'($urandom);
      @(posedge clk);
      model[i] = a_wdata;
    end
    for (int i = DEPTH; i < 128; i++) model[i] = 8'd0;
    a_en <= 0; a_we <= 0;
    for (int t = 0; t < 2000; t++) begin
      logic ae, aw, be, bw;
      logic [AW-1:0] aa, ba;
      logic [7:0] ad, bd, ea, eb;
      ae = ($urandom % 2) != 0; aw = ($urandom % 2) != 0; be = ($urandom % 2) != 0; bw = ($urandom % 3) == 0;
      aa = AW'($urandom_range(0, 127)); ba = AW'($urandom_range(0, 127));
      if (ba == aa) ba = AW'((int'(aa) + 1) % 128);   // no same-address collisions
      ad = 8'($urandom); bd = 8'($urandom);
      a_en <= ae; a_we <= aw; a_addr <= aa; a_wdata <= ad;
      b_en <= be; b_we <= bw; b_addr <= ba; b_wdata <= bd;
      ea = model[aa]; eb = model[ba];
      @(posedge clk);
      if (ae && aw && int'(aa) < DEPTH) model[aa] = ad;
      if (be && bw && int'(ba) < DEPTH) model[ba] = bd;
      #1;
      if (ae) begin checks++; if (a_rdata != ea) begin failures++; $display("A[%0d] %h != %h", aa, a_rdata, ea); end end
      if (be) begin checks++; if (b_rdata != eb) begin failures++; $display("B[%0d] %h != %h", ba, b_rdata, eb); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
