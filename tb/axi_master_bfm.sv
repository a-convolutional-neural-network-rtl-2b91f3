// axi_master_bfm: simple AXI4 master for testbenches. Tasks issue one INCR
// burst of 32-bit beats at a time; the valid signals may be delayed by a
// random number of cycles and the response ready signals stalled, so the
// slave's handshakes are exercised. Counts beats and bursts.
module axi_master_bfm #(
  parameter int ID_W = 12
) (
  input  logic            aclk,
  output logic [ID_W-1:0] awid,
  output logic [31:0]     awaddr,
  output logic [7:0]      awlen,
  output logic [2:0]      awsize,
  output logic [1:0]      awburst,
  output logic            awvalid,
  input  logic            awready,
  output logic [31:0]     wdata,
  output logic [3:0]      wstrb,
  output logic            wlast,
  output logic            wvalid,
  input  logic            wready,
  input  logic [ID_W-1:0] bid,
  input  logic [1:0]      bresp,
  input  logic            bvalid,
  output logic            bready,
  output logic [ID_W-1:0] arid,
  output logic [31:0]     araddr,
  output logic [7:0]      arlen,
  output logic [2:0]      arsize,
  output logic [1:0]      arburst,
  output logic            arvalid,
  input  logic            arready,
  input  logic [ID_W-1:0] rid,
  input  logic [31:0]     rdata,
  input  logic [1:0]      rresp,
  input  logic            rlast,
  input  logic            rvalid,
  output logic            rready
);
  int errors = 0;
  int bursts = 0;
  int beats = 0;
  int stall = 1;   // random stalls on or off

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awid = '0; awaddr = '0; awlen = '0; awsize = 3'd2; awburst = 2'b01;
    wdata = '0; wstrb = 4'hf; wlast = 0;
    arid = '0; araddr = '0; arlen = '0; arsize = 3'd2; arburst = 2'b01;
  end

  task automatic idle(int n);
    repeat (n) @(posedge aclk);
  endtask

  task automatic write_burst(input logic [31:0] addr, input logic [31:0] data[$]);
    logic [ID_W-1:0] id;
    id = ID_W'($urandom);
    if (stall != 0) idle($urandom % 2);
    awid <= id; awaddr <= addr; awlen <= 8'(data.size() - 1);
    awsize <= 3'd2; awburst <= 2'b01; awvalid <= 1;
    do @(posedge aclk); while (!awready);
    awvalid <= 0;
    for (int i = 0; i < data.size(); i++) begin
      wdata <= data[i]; wstrb <= 4'hf; wlast <= (i == data.size() - 1); wvalid <= 1;
      do @(posedge aclk); while (!wready);
      beats++;
      if (stall != 0 && $urandom % 4 == 0) begin
        wvalid <= 0;
        idle(1);
      end
    end
    wvalid <= 0; wlast <= 0;
    if (stall != 0) idle($urandom % 3);
    bready <= 1;
    do @(posedge aclk); while (!bvalid);
    bready <= 0;
    if (bid != id || bresp != 2'b00) errors++;
    bursts++;
  endtask

  task automatic read_burst(input logic [31:0] addr, input int n, output logic [31:0] data[$]);
    logic [ID_W-1:0] id;
    data.delete();
    id = ID_W'($urandom);
    arid <= id; araddr <= addr; arlen <= 8'(n - 1);
    arsize <= 3'd2; arburst <= 2'b01; arvalid <= 1;
    do @(posedge aclk); while (!arready);
    arvalid <= 0;
    for (int i = 0; i < n; i++) begin
      if (stall != 0 && $urandom % 4 == 0) begin
        rready <= 0;
        idle(1);
      end
      rready <= 1;
      do @(posedge aclk); while (!rvalid);
      data.push_back(rdata);
      beats++;
      if (rid != id || rresp != 2'b00 || rlast != (i == n - 1)) errors++;
    end
    rready <= 0;
    bursts++;
  endtask

  task automatic write_word(input logic [31:0] addr, input logic [31:0] value);
    logic [31:0] d[$];
    d.push_back(value);
    write_burst(addr, d);
  endtask

  task automatic read_word(input logic [31:0] addr, output logic [31:0] value);
    logic [31:0] d[$];
    read_burst(addr, 1, d);
    value = d[0];
  endtask
endmodule
