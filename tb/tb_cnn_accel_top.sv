// tb_cnn_accel_top: end-to-end test of the accelerator at its default sizes,
// driven only through the AXI-Full slave as the processor would drive it.
//
// Layer 1: a 28x28 single-channel image, six 5x5 filters, Hard-Swish (the
//          first convolution of LeNet-5), feature map RAMs -> cache RAMs.
// Layer 2: the six 24x24 results of layer 1 stay on chip and feed sixteen
//          5x5 filters, Hard-Sigmoid, cache RAMs -> feature map RAMs.
// Layer 3: a 10x10, 4-channel map, four 3x3 filters, padding, stride 2, no
//          activation, with large weights so that sums saturate.
// Every result is read back over AXI and compared with a direct convolution
// computed here; each layer's run time (instruction write to irq) is checked
// against the schedule of 3*K*K cycles per output pixel and channel group.
// The mechanisms exercised are counted and each must occur at least once.
module tb_cnn_accel_top;
  import conv_ref_pkg::*;
  logic aclk = 0, aresetn = 0;
  logic [11:0] awid, bid, arid, rid;
  logic [31:0] awaddr, araddr, wdata, rdata;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready, irq;
  logic [3:0]  wstrb;
  int checks = 0, failures = 0, cycle = 0, irq_count = 0;
  int n_pad = 0, n_stride2 = 0, n_k3 = 0, n_k5 = 0, n_groups = 0, n_reverse = 0;
  int n_chained = 0, n_sat = 0, n_busy_seen = 0;
  int n_mode [3] = '{0, 0, 0};

  localparam logic [31:0] FM_BASE  = 32'h000000;
  localparam logic [31:0] P_BASE   = 32'h300000;
  localparam logic [31:0] FMC_BASE = 32'h400000;
  localparam logic [31:0] CTRL     = 32'h700000;

  cnn_accel_top dut (
    .aclk, .aresetn,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready), .irq);

  axi_master_bfm bfm (.aclk, .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
                      .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
                      .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
                      .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  always #5 aclk = ~aclk;
  always @(posedge aclk) begin
    cycle++;
    if (irq) irq_count++;
  end

  initial begin
    repeat (6000000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write a byte array to consecutive RAM entries, in bursts of up to 256
  task automatic load(logic [31:0] base, ref byte d[], input int first, int n);
    logic [31:0] q[$];
    for (int i = 0; i < n; i += 256) begin
      q.delete();
      for (int j = i; j < n && j < i + 256; j++) q.push_back(32'(unsigned'(d[first + j])));
      bfm.write_burst(base + 32'(4 * i), q);
    end
  endtask

  task automatic fetch(logic [31:0] base, int n, ref byte d[], input int first);
    logic [31:0] q[$];
    for (int i = 0; i < n; i += 256) begin
      int len;
      len = (n - i < 256) ? n - i : 256;
      bfm.read_burst(base + 32'(4 * i), len, q);
      for (int j = 0; j < len; j++) d[first + i + j] = byte'(q[j][7:0]);
    end
  endtask

  function automatic logic [31:0] bank_base(logic [31:0] region0, int b);
    return region0 + 32'(b) * 32'h100000;
  endfunction

  // Run one layer whose input is already in place; returns the results.
  task automatic run_layer(ref byte fm[], ref byte w[], ref byte res[],
                           input int n, int c_n, int f_n, int k, int padf, int s2,
                           int mode, int rev);
    int pad, stride, o, groups, op, t0, t1, expc, errs;
    logic [31:0] instr, st;
    byte outb[];
    pad = (padf != 0) ? (k - 1) / 2 : 0;
    stride = (s2 != 0) ? 2 : 1;
    o = out_size(n, k, pad, stride);
    groups = (c_n + 2) / 3;
    load(P_BASE, w, 0, w.size());
    op = ((rev != 0) ? 8 : 0) + 1 + mode;
    instr = {4'(op), 7'(n), 9'(c_n), 9'(f_n), 1'(k == 5), 1'(padf), 1'(s2)};
    bfm.write_word(CTRL, instr);
    t0 = cycle;
    // poll the status register while the layer runs
    bfm.read_word(CTRL + 4, st);
    if (st[0]) n_busy_seen++;
    while (irq_count == 0) @(posedge aclk);
    t1 = cycle;
    irq_count = 0;
    bfm.read_word(CTRL + 4, st);
    checks++;
    if (st[1:0] != 2'b10) begin failures++; $display("status %b after completion", st[1:0]); end
    expc = f_n * o * o * groups * 3 * k * k;
    checks++;
    if (t1 - t0 < expc || t1 - t0 > expc + 24) begin
      failures++; $display("layer took %0d cycles, schedule %0d", t1 - t0, expc);
    end
    // read the results back: filter f in bank f%3, slot f/3
    outb = new[f_n * o * o];
    for (int f = 0; f < f_n; f++)
      fetch(bank_base((rev != 0) ? FM_BASE : FMC_BASE, f % 3) + 32'(4 * (f / 3) * o * o), o * o, outb, f * o * o);
    res = new[f_n * o * o];
    errs = 0;
    for (int f = 0; f < f_n; f++)
      for (int y = 0; y < o; y++)
        for (int x = 0; x < o; x++) begin
          int q, e;
          q = ref_conv_q(fm, w, n, c_n, k, pad, stride, f, y, x);
          if (q == 127 || q == -128) n_sat++;
          e = ref_act(q, mode);
          res[f * o * o + y * o + x] = byte'(e);
          checks++;
          if (int'(outb[f * o * o + y * o + x]) != e) begin
            failures++;
            if (errs++ < 5) $display("f%0d y%0d x%0d: got %0d expected %0d", f, y, x,
                                     outb[f * o * o + y * o + x], e);
          end
        end
    if (padf != 0) n_pad++;
    if (s2 != 0) n_stride2++;
    if (k == 3) n_k3++; else n_k5++;
    if (groups > 1) n_groups++;
    if (rev != 0) n_reverse++;
    n_mode[mode]++;
    $display("layer N=%0d C=%0d F=%0d K=%0d P=%0d S=%0d act=%0d rev=%0d: %0d cycles (%0d MACs)",
             n, c_n, f_n, k, pad, stride, mode, rev, t1 - t0, f_n * o * o * c_n * k * k);
  endtask

  // place channel c of a map at bank c%3, slot c/3 of a RAM group
  task automatic place(logic [31:0] region0, ref byte fm[], input int n, int c_n);
    for (int c = 0; c < c_n; c++)
      load(bank_base(region0, c % 3) + 32'(4 * (c / 3) * n * n), fm, c * n * n, n * n);
  endtask

  initial begin
    byte img[], w1[], r1[], w2[], r2[], m3[], w3[], r3[];
    repeat (3) @(posedge aclk);
    aresetn <= 1;
    repeat (3) @(posedge aclk);

    // layer 1: 28x28x1 -> 24x24x6, 5x5, Hard-Swish
    img = new[28 * 28];
    foreach (img[i]) img[i] = byte'($urandom_range(0, 32));   // 0 .. 2.0
    w1 = new[6 * 1 * 25];
    foreach (w1[i]) w1[i] = byte'(int'($urandom_range(0, 40)) - 20);
    place(FM_BASE, img, 28, 1);
    run_layer(img, w1, r1, 28, 1, 6, 5, 0, 0, 2, 0);

    // layer 2: its output, still in the cache RAMs -> 20x20x16, Hard-Sigmoid
    w2 = new[16 * 6 * 25];
    foreach (w2[i]) w2[i] = byte'(int'($urandom_range(0, 16)) - 8);
    run_layer(r1, w2, r2, 24, 6, 16, 5, 0, 0, 1, 1);
    n_chained++;

    // layer 3: 10x10x4 -> 5x5x4, 3x3, padding, stride 2, no activation
    m3 = new[4 * 100];
    foreach (m3[i]) m3[i] = byte'(int'($urandom_range(0, 160)) - 80);
    w3 = new[4 * 4 * 9];
    foreach (w3[i]) w3[i] = byte'($urandom);
    place(FM_BASE, m3, 10, 4);
    run_layer(m3, w3, r3, 10, 4, 4, 3, 1, 1, 0, 0);

    checks++; if (bfm.errors != 0) begin failures++; $display("AXI response errors"); end
    checks++; if (n_pad == 0)      begin failures++; $display("padding never used"); end
    checks++; if (n_stride2 == 0)  begin failures++; $display("stride 2 never used"); end
    checks++; if (n_k3 == 0 || n_k5 == 0) begin failures++; $display("a kernel size unused"); end
    checks++; if (n_groups == 0)   begin failures++; $display("single channel group only"); end
    checks++; if (n_reverse == 0)  begin failures++; $display("reverse direction unused"); end
    checks++; if (n_chained == 0)  begin failures++; $display("no chained layer"); end
    checks++; if (n_sat == 0)      begin failures++; $display("no saturation"); end
    checks++; if (n_busy_seen == 0) begin failures++; $display("busy never observed"); end
    for (int m = 0; m < 3; m++) begin
      checks++; if (n_mode[m] == 0) begin failures++; $display("activation %0d unused", m); end
    end
    $display("mechanisms: padding %0d stride2 %0d k3 %0d k5 %0d groups %0d reverse %0d chained %0d saturated %0d busy %0d modes %0d/%0d/%0d; AXI bursts %0d beats %0d",
             n_pad, n_stride2, n_k3, n_k5, n_groups, n_reverse, n_chained, n_sat, n_busy_seen,
             n_mode[0], n_mode[1], n_mode[2], bfm.bursts, bfm.beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
