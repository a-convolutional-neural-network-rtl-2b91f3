// tb_axi_slave: drives bursts of random length through the AXI slave into a
// behavioural word memory with one cycle of read latency, with random stalls
// on every channel. Checks that every beat reaches the right address with
// its strobes, that read bursts return the stored words with RLAST on the
// last beat, and that IDs and responses are echoed. Also checks a FIXED burst.
module tb_axi_slave;
  logic aclk = 0, aresetn = 0;
  logic [11:0] awid, bid, arid, rid;
  logic [31:0] awaddr, araddr, wdata, rdata;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0]  wstrb;
  logic        mem_req, mem_we;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0]  mem_wstrb;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;
  int n_fixed_writes = 0;

  axi_slave dut (.aclk, .aresetn, .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
                 .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
                 .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
                 .rid, .rdata, .rresp, .rlast, .rvalid, .rready,
                 .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_wstrb, .mem_rdata);

  axi_master_bfm bfm (.aclk, .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
                      .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
                      .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
                      .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  always #5 aclk = ~aclk;

  // behavioural memory behind the slave's memory port
  always @(posedge aclk) begin
    if (mem_req && mem_we) begin
      if (mem_wstrb != 4'hf) failures++;
      mem[mem_addr[11:2]] <= mem_wdata;
      if (mem_addr[31:12] == 20'hABCDE) n_fixed_writes++;
    end
    if (mem_req && !mem_we) mem_rdata <= mem[mem_addr[11:2]];
  end

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [1024];

  initial begin
    logic [31:0] d[$], r[$];
    for (int i = 0; i < 1024; i++) begin mem[i] = 32'(i * 7); model[i] = 32'(i * 7); end
    repeat (3) @(posedge aclk);
    aresetn <= 1;
    repeat (2) @(posedge aclk);
    for (int t = 0; t < 60; t++) begin
      int len, base;
      len  = (t < 2) ? ((t == 0) ? 1 : 256) : $urandom_range(1, 40);
      base = $urandom_range(0, 1023 - len);
      d.delete();
      for (int i = 0; i < len; i++) d.push_back($urandom);
      bfm.write_burst(32'(base * 4), d);
      for (int i = 0; i < len; i++) model[base + i] = d[i];
      // read back an overlapping window
      base = (base >= 3) ? base - 3 : base;
      len  = (base + len + 3 <= 1024 && len <= 253) ? len + 3 : len;
      bfm.read_burst(32'(base * 4), len, r);
      for (int i = 0; i < len; i++) begin
        checks++;
        if (r[i] != model[base + i]) begin
          failures++; $display("word %0d: %h expected %h", base + i, r[i], model[base + i]);
        end
      end
    end
    // FIXED burst: all beats go to one address
    begin
      @(posedge aclk);
      bfm.awaddr <= 32'hABCDE010; bfm.awlen <= 8'd3; bfm.awburst <= 2'b00; bfm.awvalid <= 1;
      do @(posedge aclk); while (!awready);
      bfm.awvalid <= 0;
      for (int i = 0; i < 4; i++) begin
        bfm.wdata <= 32'(100 + i); bfm.wlast <= (i == 3); bfm.wvalid <= 1;
        do @(posedge aclk); while (!wready);
      end
      bfm.wvalid <= 0; bfm.wlast <= 0; bfm.bready <= 1;
      do @(posedge aclk); while (!bvalid);
      bfm.bready <= 0;
      @(posedge aclk);
      checks++;
      if (n_fixed_writes != 4 || mem[4] != 32'd103) begin
        failures++; $display("FIXED burst: %0d writes, last %0d", n_fixed_writes, mem[4]);
      end
    end
    checks++;
    if (bfm.errors != 0) begin failures++; $display("%0d id/resp/last errors", bfm.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
