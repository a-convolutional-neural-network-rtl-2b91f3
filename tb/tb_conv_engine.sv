// tb_conv_engine: runs complete convolution layers on the calculation
// engine with behavioural RAMs around it. Each layer has random feature maps
// and weights placed in the documented layout; every output value is compared
// with a direct convolution computed here, and the run time with the
// schedule of 3*K*K cycles per output pixel and channel group.
// Configurations cover 3x3 and 5x5 kernels, padding, stride 2, channel
// counts that are and are not multiples of three (several channel groups),
// more than three filters, all activation modes and both data directions.
module tb_conv_engine;
  import cnn_pkg::*;
  import conv_ref_pkg::*;
  localparam int MD = 4096;   // behavioural RAM depth per bank
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  dec_t dec;
  logic [2:0]        fm_en, fm_we, fmc_en, fmc_we;
  logic [2:0][16:0]  fm_addr;
  logic [2:0][15:0]  fmc_addr;
  logic [2:0][7:0]   fm_wdata, fm_rdata, fmc_wdata, fmc_rdata;
  logic              p_en;
  logic [14:0]       p_addr;
  logic [7:0]        p_rdata;
  byte fm_mem [3][MD];
  byte fmc_mem [3][MD];
  byte p_mem [8192];
  int checks = 0, failures = 0, cycle = 0;
  int n_pad_layers = 0, n_stride2 = 0, n_multi_group = 0, n_reverse = 0, n_sat = 0;
  int n_mode [3] = '{0, 0, 0};
  int wamp = 12;   // weight range +-wamp

  conv_engine dut (.clk, .rst_n, .start, .dec, .busy, .done,
                   .fm_en, .fm_we, .fm_addr, .fm_wdata, .fm_rdata,
                   .fmc_en, .fmc_we, .fmc_addr, .fmc_wdata, .fmc_rdata,
                   .p_en, .p_addr, .p_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    for (int b = 0; b < 3; b++) begin
      if (fm_en[b]) begin
        fm_rdata[b] <= fm_mem[b][int'(fm_addr[b]) % MD];
        if (fm_we[b]) fm_mem[b][int'(fm_addr[b]) % MD] <= fm_wdata[b];
      end
      if (fmc_en[b]) begin
        fmc_rdata[b] <= fmc_mem[b][int'(fmc_addr[b]) % MD];
        if (fmc_we[b]) fmc_mem[b][int'(fmc_addr[b]) % MD] <= fmc_wdata[b];
      end
    end
    if (p_en) p_rdata <= p_mem[p_addr % 8192];
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int n, int c_n, int f_n, int k, int padf, int s2, int mode, int rev);
    byte fm[], w[];
    int pad, stride, o, groups, t0, t1, expc, errs;
    pad = (padf != 0) ? (k - 1) / 2 : 0;
    stride = (s2 != 0) ? 2 : 1;
    o = out_size(n, k, pad, stride);
    groups = (c_n + 2) / 3;
    fm = new[c_n * n * n];
    w  = new[f_n * c_n * k * k];
    foreach (fm[i]) fm[i] = byte'($urandom_range(0, 80) - 40);
    foreach (w[i])  w[i]  = byte'(int'($urandom_range(0, 2 * wamp)) - wamp);
    // place data: channel c -> bank c%3, slot c/3
    for (int c = 0; c < c_n; c++)
      for (int i = 0; i < n * n; i++)
        if (rev != 0) fmc_mem[c % 3][(c / 3) * n * n + i] = fm[c * n * n + i];
        else     fm_mem[c % 3][(c / 3) * n * n + i]  = fm[c * n * n + i];
    foreach (w[i]) p_mem[i] = w[i];
    dec = '0;
    dec.valid_op = 1; dec.reverse = rev[0]; dec.act = act_e'(mode);
    dec.fm_size = 7'(n); dec.in_ch = 9'(c_n); dec.filters = 9'(f_n);
    dec.k = 3'(k); dec.kk = 5'(k * k); dec.pad = 2'(pad); dec.stride = 2'(stride);
    dec.out_size = 8'(o);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    t0 = cycle;
    start <= 0;
    do @(posedge clk); while (!done);
    t1 = cycle;
    // schedule: setup cycle, 3*K*K cycles per pixel and group, pipeline tail
    expc = f_n * o * o * groups * 3 * k * k;
    checks++;
    if (t1 - t0 < expc || t1 - t0 > expc + 16) begin
      failures++; $display("layer took %0d cycles, schedule %0d", t1 - t0, expc);
    end
    @(posedge clk);
    errs = 0;
    for (int f = 0; f < f_n; f++)
      for (int y = 0; y < o; y++)
        for (int x = 0; x < o; x++) begin
          int e, g, a, q;
          q = ref_conv_q(fm, w, n, c_n, k, pad, stride, f, y, x);
          if (q == 127 || q == -128) n_sat++;   // rescaled sum saturates
          e = ref_act(q, mode);
          a = (f / 3) * o * o + y * o + x;
          g = (rev != 0) ? int'(fm_mem[f % 3][a]) : int'(fmc_mem[f % 3][a]);
          checks++;
          if (g != e) begin
            failures++;
            if (errs++ < 5) $display("f%0d y%0d x%0d: got %0d expected %0d", f, y, x, g, e);
          end
        end
    if (padf != 0) n_pad_layers++;
    if (s2 != 0) n_stride2++;
    if (groups > 1) n_multi_group++;
    if (rev != 0) n_reverse++;
    n_mode[mode]++;
    $display("layer N=%0d C=%0d F=%0d K=%0d P=%0d S=%0d act=%0d rev=%0d: %0d cycles",
             n, c_n, f_n, k, pad, stride, mode, rev, t1 - t0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_layer(6, 3, 3, 3, 1, 0, 0, 0);
    run_layer(9, 5, 4, 5, 0, 1, 2, 0);
    run_layer(7, 1, 2, 5, 1, 0, 1, 1);
    run_layer(8, 7, 5, 3, 0, 1, 2, 1);
    run_layer(5, 2, 1, 3, 1, 1, 0, 0);
    wamp = 127;   // large weights: rescaled sums saturate
    run_layer(6, 4, 2, 3, 1, 0, 2, 0);
    // every mechanism must have been exercised
    checks++; if (n_pad_layers == 0)  begin failures++; $display("no padding"); end
    checks++; if (n_stride2 == 0)     begin failures++; $display("no stride 2"); end
    checks++; if (n_multi_group == 0) begin failures++; $display("no channel groups"); end
    checks++; if (n_reverse == 0)     begin failures++; $display("no reverse"); end
    checks++; if (n_sat == 0)         begin failures++; $display("no saturation"); end
    for (int m = 0; m < 3; m++) begin
      checks++; if (n_mode[m] == 0) begin failures++; $display("mode %0d unused", m); end
    end
    $display("padding %0d, stride2 %0d, multi-group %0d, reverse %0d, saturations %0d",
             n_pad_layers, n_stride2, n_multi_group, n_reverse, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
