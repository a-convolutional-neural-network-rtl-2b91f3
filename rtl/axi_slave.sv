// axi_slave: AXI4 (AXI-Full) slave that turns bursts from the processor
// into accesses on a simple memory port.
//
// The processor loads feature maps and parameters into the on-chip RAMs and
// writes instructions through this slave. One transaction is handled at a
// time, writes before reads when both are requested. A write burst performs
// one memory write per W beat; a read burst performs one memory read per R
// beat (the memory port answers one cycle after mem_req). INCR and FIXED
// bursts are supported, WRAP is treated as INCR. Every response is OKAY.
// The memory port carries the byte address of the beat (mem_addr), the write
// data and strobes as they came on the bus, and expects read data in
// mem_rdata one cycle after a read request.
//
// The document names an AXI-Full slave between the processor and the RAMs;
// everything about its implementation is this design's choice. Throughput is
// one beat per cycle on writes and one beat per two cycles on reads.
module axi_slave #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ID_W   = 12
) (
  input  logic                  aclk,
  input  logic                  aresetn,
  // write address
  input  logic [ID_W-1:0]       awid,
  input  logic [ADDR_W-1:0]     awaddr,
  input  logic [7:0]            awlen,
  input  logic [2:0]            awsize,
  input  logic [1:0]            awburst,
  input  logic                  awvalid,
  output logic                  awready,
  // write data
  input  logic [DATA_W-1:0]     wdata,
  input  logic [DATA_W/8-1:0]   wstrb,
  input  logic                  wlast,
  input  logic                  wvalid,
  output logic                  wready,
  // write response
  output logic [ID_W-1:0]       bid,
  output logic [1:0]            bresp,
  output logic                  bvalid,
  input  logic                  bready,
  // read address
  input  logic [ID_W-1:0]       arid,
  input  logic [ADDR_W-1:0]     araddr,
  input  logic [7:0]            arlen,
  input  logic [2:0]            arsize,
  input  logic [1:0]            arburst,
  input  logic                  arvalid,
  output logic                  arready,
  // read data
  output logic [ID_W-1:0]       rid,
  output logic [DATA_W-1:0]     rdata,
  output logic [1:0]            rresp,
  output logic                  rlast,
  output logic                  rvalid,
  input  logic                  rready,
  // memory port
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic [DATA_W-1:0]     mem_wdata,
  output logic [DATA_W/8-1:0]   mem_wstrb,
  input  logic [DATA_W-1:0]     mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_WRESP, S_RADDR, S_RWAIT, S_RDATA} state_e;

  state_e            state;
  logic [ADDR_W-1:0] addr;
  logic [7:0]        beats_left;
  logic [2:0]        size;
  logic [1:0]        burst;
  logic [ID_W-1:0]   id;

  function automatic logic [ADDR_W-1:0] next_addr(logic [ADDR_W-1:0] a,
                                                 logic [2:0] sz, logic [1:0] bt);
    return (bt == 2'b00) ? a : a + (ADDR_W'(1) << sz);
  endfunction

  assign awready   = (state == S_IDLE);
  assign arready   = (state == S_IDLE) && !awvalid;
  assign wready    = (state == S_WDATA);
  assign bvalid    = (state == S_WRESP);
  assign bid       = id;
  assign bresp     = 2'b00;
  assign rvalid    = (state == S_RDATA);
  assign rid       = id;
  assign rresp     = 2'b00;
  assign rlast     = (state == S_RDATA) && (beats_left == 0);

  assign mem_req   = (state == S_WDATA && wvalid) || (state == S_RADDR);
  assign mem_we    = (state == S_WDATA);
  assign mem_addr  = addr;
  assign mem_wdata = wdata;
  assign mem_wstrb = wstrb;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state      <= S_IDLE;
      addr       <= '0;
      beats_left <= '0;
      size       <= '0;
      burst      <= '0;
      id         <= '0;
      rdata      <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (awvalid) begin
            addr <= awaddr; beats_left <= awlen; size <= awsize;
            burst <= awburst; id <= awid;
            state <= S_WDATA;
          end else if (arvalid) begin
            addr <= araddr; beats_left <= arlen; size <= arsize;
            burst <= arburst; id <= arid;
            state <= S_RADDR;
          end
        end
        S_WDATA: if (wvalid) begin
          addr <= next_addr(addr, size, burst);
          if (beats_left == 0) state <= S_WRESP;
          else beats_left <= beats_left - 1'b1;
        end
        S_WRESP: if (bready) state <= S_IDLE;
        S_RADDR: state <= S_RWAIT;
        S_RWAIT: begin
          rdata <= mem_rdata;
          state <= S_RDATA;
        end
        S_RDATA: if (rready) begin
          if (beats_left == 0) state <= S_IDLE;
          else begin
            beats_left <= beats_left - 1'b1;
            addr       <= next_addr(addr, size, burst);
            state      <= S_RADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The master's WLAST must mark the beat the burst length announced.
  assert property (@(posedge aclk) disable iff (!aresetn)
                   (state == S_WDATA && wvalid) |-> (wlast == (beats_left == 0)));
  // Channel rules: a valid response stays until it is taken.
  assert property (@(posedge aclk) disable iff (!aresetn)
                   (bvalid && !bready) |=> bvalid);
  assert property (@(posedge aclk) disable iff (!aresetn)
                   (rvalid && !rready) |=> (rvalid && $stable(rdata)));

endmodule
