// AXI4-Lite master for the testbenches, standing in for the processor.
// write() offers address and data together and waits for the response;
// read() offers the address and returns data and response. Both sample the
// slave's handshake signals at the falling edge and change their own outputs
// only at rising edges. `gap` adds idle cycles before bready/rready are
// raised, to exercise response back-pressure.
module tb_axil_master #(
  parameter int AW = 32
) (
  input  logic          clk,
  output logic [AW-1:0] awaddr,
  output logic          awvalid,
  input  logic          awready,
  output logic [31:0]   wdata,
  output logic [3:0]    wstrb,
  output logic          wvalid,
  input  logic          wready,
  input  logic [1:0]    bresp,
  input  logic          bvalid,
  output logic          bready,
  output logic [AW-1:0] araddr,
  output logic          arvalid,
  input  logic          arready,
  input  logic [31:0]   rdata,
  input  logic [1:0]    rresp,
  input  logic          rvalid,
  output logic          rready
);

  int gap = 0;

  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  task automatic write(input logic [AW-1:0] addr, input logic [31:0] data,
                       output logic [1:0] resp);
    bit aw_ok = 0, w_ok = 0, a, w;
    @(posedge clk);
    awaddr <= addr; awvalid <= 1; wdata <= data; wstrb <= 4'hF; wvalid <= 1;
    while (!(aw_ok && w_ok)) begin
      @(negedge clk);
      a = awvalid && awready;
      w = wvalid && wready;
      @(posedge clk);
      if (a) begin awvalid <= 0; aw_ok = 1; end
      if (w) begin wvalid <= 0; w_ok = 1; end
    end
    repeat (gap) @(posedge clk);
    bready <= 1;
    do @(negedge clk); while (!bvalid);
    resp = bresp;
    @(posedge clk);
    bready <= 0;
  endtask

  task automatic read(input logic [AW-1:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    bit a;
    @(posedge clk);
    araddr <= addr; arvalid <= 1;
    do begin
      @(negedge clk);
      a = arready;
      @(posedge clk);
    end while (!a);
    arvalid <= 0;
    repeat (gap) @(posedge clk);
    rready <= 1;
    do @(negedge clk); while (!rvalid);
    data = rdata; resp = rresp;
    @(posedge clk);
    rready <= 0;
  endtask

endmodule
