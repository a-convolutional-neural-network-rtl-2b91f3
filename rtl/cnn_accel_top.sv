// cnn_accel_top: programmable-logic side of the CNN accelerator.
//
// The processor reaches the accelerator through an AXI-Full slave. Through it
// it loads input feature maps into three feature map RAMs (FM-RAM1..3,
// 102400 x 8 bit each), weights into the parameter RAM (P-RAM, 20480 x 8 bit),
// reads results from three feature map cache RAMs (FMC-RAM1..3, 53248 x 8 bit
// each), and writes 32-bit instructions. Each instruction runs one
// convolution layer on the calculation engine (three conv units with 25 DSP
// multipliers each, an activation unit), which uses the second port of every
// RAM. Memories, their sizes, the AXI-Full slave and the instruction format
// follow the document; the address map below and the control registers are
// this design's.
//
// Address map (byte addresses; every 32-bit word holds one RAM byte in bits
// [7:0], so RAM entry i of a region is at region base + 4*i):
//   0x000000 FM-RAM1    0x100000 FM-RAM2    0x200000 FM-RAM3
//   0x300000 P-RAM
//   0x400000 FMC-RAM1   0x500000 FMC-RAM2   0x600000 FMC-RAM3
//   0x700000 instruction register (write starts the instruction if the engine
//            is idle and the instruction is a valid convolution)
//   0x700004 status: bit 0 busy, bit 1 done (set at completion, cleared by
//            the next instruction write)
// `irq` pulses for one cycle when an instruction completes.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned AXI_DW    = 32,
  parameter int unsigned ID_W      = 12,
  parameter int unsigned FM_DEPTH  = 102400,
  parameter int unsigned P_DEPTH   = 20480,
  parameter int unsigned FMC_DEPTH = 53248
) (
  input  logic                  aclk,
  input  logic                  aresetn,
  input  logic [ID_W-1:0]       s_axi_awid,
  input  logic [ADDR_W-1:0]     s_axi_awaddr,
  input  logic [7:0]            s_axi_awlen,
  input  logic [2:0]            s_axi_awsize,
  input  logic [1:0]            s_axi_awburst,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [AXI_DW-1:0]     s_axi_wdata,
  input  logic [AXI_DW/8-1:0]   s_axi_wstrb,
  input  logic                  s_axi_wlast,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [ID_W-1:0]       s_axi_bid,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [ID_W-1:0]       s_axi_arid,
  input  logic [ADDR_W-1:0]     s_axi_araddr,
  input  logic [7:0]            s_axi_arlen,
  input  logic [2:0]            s_axi_arsize,
  input  logic [1:0]            s_axi_arburst,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [ID_W-1:0]       s_axi_rid,
  output logic [AXI_DW-1:0]     s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rlast,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  output logic                  irq
);

  localparam int unsigned FM_AW  = $clog2(FM_DEPTH);
  localparam int unsigned P_AW   = $clog2(P_DEPTH);
  localparam int unsigned FMC_AW = $clog2(FMC_DEPTH);

  // ------------------------------------------------------------ bus side
  logic                mem_req, mem_we;
  logic [ADDR_W-1:0]   mem_addr;
  logic [AXI_DW-1:0]   mem_wdata, mem_rdata;
  logic [AXI_DW/8-1:0] mem_wstrb;
  logic [3:0]          region, region_q;
  logic [17:0]         index;
  logic                wr_byte;

  axi_slave #(.ADDR_W(ADDR_W), .DATA_W(AXI_DW), .ID_W(ID_W)) u_axi (
    .aclk, .aresetn,
    .awid(s_axi_awid), .awaddr(s_axi_awaddr), .awlen(s_axi_awlen),
    .awsize(s_axi_awsize), .awburst(s_axi_awburst),
    .awvalid(s_axi_awvalid), .awready(s_axi_awready),
    .wdata(s_axi_wdata), .wstrb(s_axi_wstrb), .wlast(s_axi_wlast),
    .wvalid(s_axi_wvalid), .wready(s_axi_wready),
    .bid(s_axi_bid), .bresp(s_axi_bresp), .bvalid(s_axi_bvalid), .bready(s_axi_bready),
    .arid(s_axi_arid), .araddr(s_axi_araddr), .arlen(s_axi_arlen),
    .arsize(s_axi_arsize), .arburst(s_axi_arburst),
    .arvalid(s_axi_arvalid), .arready(s_axi_arready),
    .rid(s_axi_rid), .rdata(s_axi_rdata), .rresp(s_axi_rresp),
    .rlast(s_axi_rlast), .rvalid(s_axi_rvalid), .rready(s_axi_rready),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_wstrb, .mem_rdata);

  assign region  = mem_addr[23:20];
  assign index   = mem_addr[19:2];
  assign wr_byte = mem_req && mem_we && mem_wstrb[0];

  // ------------------------------------------------------------ control
  logic [31:0] instr_q;
  dec_t        dec;
  logic        dec_valid, start, busy, done, done_flag;
  logic        instr_wr;

  assign instr_wr = mem_req && mem_we && (region == 4'd7) && (index == '0);

  instr_decoder u_dec (.instr(instr_q), .dec, .valid(dec_valid));

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      instr_q   <= '0;
      start     <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (instr_wr && !busy && !start) begin
        instr_q <= mem_wdata;
        start   <= 1'b1;   // checked against the decoded instruction below
      end
      if (instr_wr) done_flag <= 1'b0;
      else if (done) done_flag <= 1'b1;
    end
  end

  assign irq = done;

  // ------------------------------------------------------------ memories
  logic [NBANK-1:0]             fm_en, fm_we, fmc_en, fmc_we;
  logic [NBANK-1:0][FM_AW-1:0]  fm_addr;
  logic [NBANK-1:0][FMC_AW-1:0] fmc_addr;
  logic [NBANK-1:0][7:0]        fm_wdata, fm_rdata, fmc_wdata, fmc_rdata;
  logic [NBANK-1:0][7:0]        fm_a_rdata, fmc_a_rdata;
  logic                         p_en;
  logic [P_AW-1:0]              p_addr;
  logic [7:0]                   p_rdata, p_a_rdata;

  for (genvar b = 0; b < int'(NBANK); b++) begin : g_bank
    dp_bram #(.W(8), .DEPTH(FM_DEPTH), .AW(FM_AW)) u_fm_ram (
      .clk(aclk),
      .a_en(mem_req && region == 4'(b)), .a_we(wr_byte), .a_addr(FM_AW'(index)),
      .a_wdata(mem_wdata[7:0]), .a_rdata(fm_a_rdata[b]),
      .b_en(fm_en[b]), .b_we(fm_we[b]), .b_addr(fm_addr[b]),
      .b_wdata(fm_wdata[b]), .b_rdata(fm_rdata[b]));

    dp_bram #(.W(8), .DEPTH(FMC_DEPTH), .AW(FMC_AW)) u_fmc_ram (
      .clk(aclk),
      .a_en(mem_req && region == 4'(b + 4)), .a_we(wr_byte), .a_addr(FMC_AW'(index)),
      .a_wdata(mem_wdata[7:0]), .a_rdata(fmc_a_rdata[b]),
      .b_en(fmc_en[b]), .b_we(fmc_we[b]), .b_addr(fmc_addr[b]),
      .b_wdata(fmc_wdata[b]), .b_rdata(fmc_rdata[b]));
  end

  dp_bram #(.W(8), .DEPTH(P_DEPTH), .AW(P_AW)) u_p_ram (
    .clk(aclk),
    .a_en(mem_req && region == 4'd3), .a_we(wr_byte), .a_addr(P_AW'(index)),
    .a_wdata(mem_wdata[7:0]), .a_rdata(p_a_rdata),
    .b_en(p_en), .b_we(1'b0), .b_addr(p_addr), .b_wdata(8'd0), .b_rdata(p_rdata));

  // read data back to the bus, one cycle after the request
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) region_q <= '0;
    else if (mem_req)  region_q <= region;
  end

  always_comb begin
    unique case (region_q)
      4'd0, 4'd1, 4'd2: mem_rdata = AXI_DW'(fm_a_rdata[region_q[1:0]]);
      4'd3:             mem_rdata = AXI_DW'(p_a_rdata);
      4'd4, 4'd5, 4'd6: mem_rdata = AXI_DW'(fmc_a_rdata[2'(region_q - 4'd4)]);
      4'd7:             mem_rdata = AXI_DW'({done_flag, busy});
      default:          mem_rdata = '0;
    endcase
  end

  // ------------------------------------------------------------ engine
  conv_engine #(.FM_AW(FM_AW), .FMC_AW(FMC_AW), .P_AW(P_AW)) u_engine (
    .clk(aclk), .rst_n(aresetn), .start(start && dec_valid), .dec, .busy, .done,
    .fm_en, .fm_we, .fm_addr, .fm_wdata, .fm_rdata,
    .fmc_en, .fmc_we, .fmc_addr, .fmc_wdata, .fmc_rdata,
    .p_en, .p_addr, .p_rdata);

endmodule
