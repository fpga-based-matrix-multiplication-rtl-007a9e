// AXI4-Lite register slave for the testbenches: 16 words indexed by address
// bits 5:2, random ready and response delays, counts the transfers it has
// seen. Stands in for a register port that is not part of the design, such
// as the DMA's.
module tb_axil_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready
);

  logic [31:0] regs [16];
  int writes = 0, reads = 0;
  logic [31:0] last_waddr, last_raddr;
  logic aw_got, w_got;
  logic [31:0] aw_q, w_q;

  assign bresp = 2'b00;
  assign rresp = 2'b00;

  initial begin
    foreach (regs[i]) regs[i] = 0;
    awready = 0; wready = 0; bvalid = 0; arready = 0; rvalid = 0; rdata = 0;
    aw_got = 0; w_got = 0; aw_q = 0; w_q = 0; last_waddr = 0; last_raddr = 0;
  end

  // write side: random readiness
  always @(posedge clk) begin
    if (awvalid && awready) begin aw_got = 1; aw_q = awaddr; end
    if (wvalid && wready)   begin w_got = 1;  w_q = wdata;   end
    if (bvalid && bready) bvalid <= 0;
    if (aw_got && w_got && !bvalid) begin
      regs[aw_q[5:2]] = w_q;
      last_waddr = aw_q;
      writes++;
      aw_got = 0; w_got = 0;
      bvalid <= 1;
    end
    awready <= !aw_got && ($urandom % 3 != 0);
    wready  <= !w_got && ($urandom % 3 != 0);
  end

  // read side
  logic ar_got = 0;
  logic [31:0] ar_q = 0;
  always @(posedge clk) begin
    if (arvalid && arready) begin ar_got = 1; ar_q = araddr; end
    if (rvalid && rready) rvalid <= 0;
    if (ar_got && !rvalid && ($urandom % 2 == 0)) begin
      rdata <= regs[ar_q[5:2]];
      last_raddr = ar_q;
      reads++;
      ar_got = 0;
      rvalid <= 1;
    end
    arready <= !ar_got && ($urandom % 3 != 0);
  end

endmodule
