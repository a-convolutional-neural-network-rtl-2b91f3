// conv_engine: the calculation side of the accelerator. It executes one
// convolution instruction over the on-chip RAMs with three conv units.
//
// Data layout (this design's choice; the document gives none):
//   input channel c  -> source bank c mod 3, at (c div 3)*N*N + y*N + x
//   output channel f -> destination bank f mod 3, at (f div 3)*OUT*OUT + y*OUT + x
//   weight (f, c, ky, kx) -> parameter RAM at ((f*C + c)*K + ky)*K + kx
// Normally the source is the feature map RAMs and the destination the
// feature map cache RAMs; a reversed instruction swaps them, so layers can
// run back to back without the processor moving data.
//
// Loop order: filter f, output row, output column, channel group g (three
// input channels at a time, one per conv unit). For each group the engine
// spends 3*K*K cycles: during the first K*K it reads the window from the three
// source banks in parallel (zeros for padding and for channels beyond C), and
// throughout it reads the parameter RAM serially, K*K weights for conv unit 0,
// then 1, then 2. The conv units return one dot product each per group; their
// sum is added to the partial sum of the output pixel. After the last group
// the sum is rescaled from the product format (ACT_FRAC + W_FRAC fraction bits)
// to the 8-bit activation format, rounded and saturated, passed through the
// activation unit, and written to the destination bank.
//
// Interface: `start` (one cycle, with `dec` valid) begins an instruction
// while `busy` is low; `done` pulses in the cycle after the last output is
// written. RAM ports have one cycle of read latency.
module conv_engine
  import cnn_pkg::*;
#(
  parameter int unsigned FM_AW  = 17,   // feature map RAM address bits
  parameter int unsigned FMC_AW = 16,   // feature map cache RAM address bits
  parameter int unsigned P_AW   = 15,   // parameter RAM address bits
  parameter int unsigned WFRAC  = W_FRAC,
  parameter int unsigned AFRAC  = ACT_FRAC
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  dec_t                         dec,
  output logic                         busy,
  output logic                         done,
  // feature map RAMs, port B
  output logic [NBANK-1:0]             fm_en,
  output logic [NBANK-1:0]             fm_we,
  output logic [NBANK-1:0][FM_AW-1:0]  fm_addr,
  output logic [NBANK-1:0][7:0]        fm_wdata,
  input  logic [NBANK-1:0][7:0]        fm_rdata,
  // feature map cache RAMs, port B
  output logic [NBANK-1:0]             fmc_en,
  output logic [NBANK-1:0]             fmc_we,
  output logic [NBANK-1:0][FMC_AW-1:0] fmc_addr,
  output logic [NBANK-1:0][7:0]        fmc_wdata,
  input  logic [NBANK-1:0][7:0]        fmc_rdata,
  // parameter RAM, port B (read only)
  output logic                         p_en,
  output logic [P_AW-1:0]              p_addr,
  input  logic [7:0]                   p_rdata
);

  localparam int unsigned ACC_W = PROD_W + $clog2(KK_MAX);
  localparam int unsigned AD_W  = 18;   // internal address arithmetic

  typedef enum logic [1:0] {G_IDLE, G_SETUP, G_RUN, G_WAIT} gstate_e;

  gstate_e           gstate;
  dec_t              cfg;
  logic [13:0]       n2;        // N*N
  logic [15:0]       out2;      // OUT*OUT
  logic [7:0]        groups;    // ceil(C/3)
  logic [13:0]       ckk;       // C*K*K
  logic [24:0]       total;     // F*OUT*OUT outputs

  // generator counters
  logic [8:0]        f;
  logic [7:0]        oy, ox, g;
  logic [1:0]        u;
  logic [4:0]        j;
  logic [2:0]        ky, kx;
  logic [9:0]        c3;        // 3*g
  logic signed [9:0] oys, oxs;  // oy*S - P, ox*S - P
  logic [AD_W-1:0]   gbase;     // g*N*N
  logic [AD_W-1:0]   wbase_f;   // f*C*K*K
  logic [AD_W-1:0]   wptr;      // parameter address of the current cycle

  logic              last_j, last_u, last_g, last_ox, last_oy, last_f;
  logic signed [9:0] iy, ix;
  logic signed [9:0] n_s;       // N as a signed number for the bounds checks
  logic              pix_in;
  logic [AD_W-1:0]   src_addr;
  logic [NBANK-1:0]  src_en;
  logic              w_ch_ok;

  // one-cycle tags that follow the RAM reads
  logic              t_wv, t_wz, t_fv;
  logic [1:0]        t_wu;
  logic [NBANK-1:0]  t_fz;

  // conv units
  logic [NBANK-1:0]            cu_fm_valid, cu_wt_valid, cu_fm_ready, cu_wt_ready, cu_res_valid;
  logic [NBANK-1:0][7:0]       cu_fm_data, cu_wt_data, src_rdata;
  logic signed [ACC_W-1:0]     cu_res [NBANK];

  // collector
  logic signed [ACC_W-1:0]     r0, r1;
  logic signed [31:0]          psum, sum_now, rounded;
  logic [7:0]                  g_col;
  logic [1:0]                  o_bank;
  logic [AD_W-1:0]             o_base;
  logic [15:0]                 o_pix;
  logic                        act_in_valid;
  logic signed [7:0]           act_x, act_y;
  logic                        act_out_valid;
  logic [1:0]                  a_bank [3];
  logic [AD_W-1:0]             a_addr [3];
  logic [24:0]                 wcount;

  // ---------------------------------------------------------------- generator
  assign last_j  = (j  == cfg.kk - 1'b1);
  assign last_u  = (u  == 2'd2);
  assign last_g  = (g  == groups - 1'b1);
  assign last_ox = (ox == cfg.out_size - 1'b1);
  assign last_oy = (oy == cfg.out_size - 1'b1);
  assign last_f  = (f  == cfg.filters - 1'b1);

  assign n_s      = $signed(10'(cfg.fm_size));
  assign iy       = oys + 10'(ky);
  assign ix       = oxs + 10'(kx);
  assign pix_in   = (iy >= 0) && (iy < n_s) && (ix >= 0) && (ix < n_s);
  assign src_addr = gbase + AD_W'(iy[6:0]) * AD_W'(cfg.fm_size) + AD_W'(ix[6:0]);
  assign w_ch_ok  = (c3 + 10'(u)) < 10'(cfg.in_ch);

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++)
      src_en[b] = (gstate == G_RUN) && (u == 2'd0) && pix_in
                  && ((c3 + 10'(b)) < 10'(cfg.in_ch));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gstate <= G_IDLE;
      cfg    <= '0;
      {n2, out2, groups, ckk, total} <= '0;
      {f, oy, ox, g, u, j, ky, kx, c3} <= '0;
      {oys, oxs} <= '0;
      {gbase, wbase_f, wptr} <= '0;
    end else begin
      unique case (gstate)
        G_IDLE: if (start) begin
          cfg    <= dec;
          gstate <= G_SETUP;
        end
        G_SETUP: begin
          n2     <= 14'(cfg.fm_size) * 14'(cfg.fm_size);
          out2   <= 16'(cfg.out_size) * 16'(cfg.out_size);
          groups <= 8'((10'(cfg.in_ch) + 10'd2) / 10'd3);
          ckk    <= 14'(cfg.in_ch) * 14'(cfg.kk);
          total  <= 25'(cfg.filters) * 25'(cfg.out_size) * 25'(cfg.out_size);
          {f, oy, ox, g, u, j, ky, kx, c3} <= '0;
          oys    <= -10'(cfg.pad);
          oxs    <= -10'(cfg.pad);
          gbase  <= '0;
          wbase_f <= '0;
          wptr   <= '0;
          gstate <= G_RUN;
        end
        G_RUN: begin
          wptr <= wptr + 1'b1;
          if (u == 2'd0) begin
            if (kx == cfg.k - 1'b1) begin
              kx <= '0;
              ky <= ky + 1'b1;
            end else kx <= kx + 1'b1;
          end
          if (!last_j) j <= j + 1'b1;
          else begin
            j  <= '0;
            kx <= '0;
            ky <= '0;
            if (!last_u) u <= u + 1'b1;
            else begin
              u <= '0;
              if (!last_g) begin
                g     <= g + 1'b1;
                c3    <= c3 + 10'd3;
                gbase <= gbase + AD_W'(n2);
              end else begin
                g     <= '0;
                c3    <= '0;
                gbase <= '0;
                wptr  <= wbase_f;
                if (!last_ox) begin
                  ox  <= ox + 1'b1;
                  oxs <= oxs + 10'(cfg.stride);
                end else begin
                  ox  <= '0;
                  oxs <= -10'(cfg.pad);
                  if (!last_oy) begin
                    oy  <= oy + 1'b1;
                    oys <= oys + 10'(cfg.stride);
                  end else begin
                    oy      <= '0;
                    oys     <= -10'(cfg.pad);
                    f       <= f + 1'b1;
                    wbase_f <= wbase_f + AD_W'(ckk);
                    wptr    <= wbase_f + AD_W'(ckk);
                    if (last_f) gstate <= G_WAIT;
                  end
                end
              end
            end
          end
        end
        G_WAIT: if (done) gstate <= G_IDLE;
        default: gstate <= G_IDLE;
      endcase
    end
  end

  assign busy = (gstate != G_IDLE);

  // RAM read requests of the generator
  assign p_en   = (gstate == G_RUN) && w_ch_ok;
  assign p_addr = P_AW'(wptr);

  // --------------------------------------------------------- read data tags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {t_wv, t_wz, t_fv, t_wu, t_fz} <= '0;
    end else begin
      t_wv <= (gstate == G_RUN);
      t_wu <= u;
      t_wz <= !w_ch_ok;
      t_fv <= (gstate == G_RUN) && (u == 2'd0);
      t_fz <= ~src_en;
    end
  end

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      src_rdata[b]   = cfg.reverse ? fmc_rdata[b] : fm_rdata[b];
      cu_fm_valid[b] = t_fv;
      cu_fm_data[b]  = t_fz[b] ? 8'd0 : src_rdata[b];
      cu_wt_valid[b] = t_wv && (t_wu == 2'(b));
      cu_wt_data[b]  = t_wz ? 8'd0 : p_rdata;
    end
  end

  for (genvar b = 0; b < int'(NBANK); b++) begin : g_cu
    conv_unit #(.NUM(KK_MAX), .DW(DATA_W), .PW(PROD_W), .AW(ACC_W)) u_cu (
      .clk, .rst_n, .count(($clog2(KK_MAX+1))'(cfg.kk)),
      .fm_valid(cu_fm_valid[b]), .fm_data(cu_fm_data[b]), .fm_ready(cu_fm_ready[b]),
      .wt_valid(cu_wt_valid[b]), .wt_data(cu_wt_data[b]), .wt_ready(cu_wt_ready[b]),
      .result_valid(cu_res_valid[b]), .result(cu_res[b]));
  end

  // The schedule never lets a conv unit's FIFO fill up.
  assert property (@(posedge clk) disable iff (!rst_n) &(cu_fm_ready & cu_wt_ready));

  // ---------------------------------------------------------------- collector
  assign sum_now = psum + 32'(r0) + 32'(r1) + 32'(cu_res[2]);
  assign rounded = (sum_now + (32'sd1 <<< (WFRAC - 1))) >>> WFRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r0, r1, psum, g_col, o_bank, o_base, o_pix} <= '0;
      act_in_valid <= 1'b0;
      act_x        <= '0;
      for (int s = 0; s < 3; s++) begin
        a_bank[s] <= '0;
        a_addr[s] <= '0;
      end
    end else begin
      act_in_valid <= 1'b0;
      if (gstate == G_SETUP) begin
        {psum, g_col, o_bank, o_base, o_pix} <= '0;
      end
      if (cu_res_valid[0]) r0 <= cu_res[0];
      if (cu_res_valid[1]) r1 <= cu_res[1];
      if (cu_res_valid[2]) begin
        if (g_col != groups - 1'b1) begin
          psum  <= sum_now;
          g_col <= g_col + 1'b1;
        end else begin
          psum         <= '0;
          g_col        <= '0;
          act_in_valid <= 1'b1;
          if (rounded > 32'sd127)       act_x <= 8'sd127;
          else if (rounded < -32'sd128) act_x <= -8'sd128;
          else                          act_x <= 8'(rounded);
          a_bank[0] <= o_bank;
          a_addr[0] <= o_base + AD_W'(o_pix);
          if (o_pix != out2 - 1'b1) o_pix <= o_pix + 1'b1;
          else begin
            o_pix <= '0;
            if (o_bank != 2'd2) o_bank <= o_bank + 1'b1;
            else begin
              o_bank <= '0;
              o_base <= o_base + AD_W'(out2);
            end
          end
        end
      end
      // destination of the values inside the 3-cycle activation pipeline
      for (int s = 1; s < 3; s++) begin
        a_bank[s] <= a_bank[s-1];
        a_addr[s] <= a_addr[s-1];
      end
    end
  end

  activation_unit #(.DW(DATA_W), .FRAC(AFRAC)) u_act (
    .clk, .rst_n, .mode(cfg.act), .in_valid(act_in_valid), .x(act_x),
    .out_valid(act_out_valid), .y(act_y));

  // ------------------------------------------------------------ write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcount <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (gstate == G_SETUP) wcount <= '0;
      else if (act_out_valid) begin
        wcount <= wcount + 1'b1;
        if (wcount + 1'b1 == total) done <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      // feature map RAMs: read in forward mode, written in reverse mode
      fm_en[b]     = cfg.reverse ? (act_out_valid && a_bank[2] == 2'(b)) : src_en[b];
      fm_we[b]     = cfg.reverse && act_out_valid && a_bank[2] == 2'(b);
      fm_addr[b]   = cfg.reverse ? FM_AW'(a_addr[2]) : FM_AW'(src_addr);
      fm_wdata[b]  = act_y;
      // feature map cache RAMs: the other way round
      fmc_en[b]    = cfg.reverse ? src_en[b] : (act_out_valid && a_bank[2] == 2'(b));
      fmc_we[b]    = !cfg.reverse && act_out_valid && a_bank[2] == 2'(b);
      fmc_addr[b]  = cfg.reverse ? FMC_AW'(src_addr) : FMC_AW'(a_addr[2]);
      fmc_wdata[b] = act_y;
    end
  end

endmodule
