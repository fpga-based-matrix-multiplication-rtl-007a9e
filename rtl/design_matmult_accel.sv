// Programmable-logic side of the matrix multiplication system.
//
// The processor writes matrices A and B (N x N floats, row-major) to DDR,
// programs the DMA to stream them out (MM2S) and to receive C (S2MM), and
// starts the IP through its control registers. This top holds the fabric
// part of that system:
//   u_rst    synchronised resets from FCLK_RESET0_N
//   u_xbar   AXI4-Lite control routing from the processor's general-purpose
//            master: 0x4000_0000 (64 KiB) to the IP, 0x41E0_0000 (64 KiB)
//            to the DMA's registers
//   u_accel  the matrix multiplication IP
// The processor and the DMA are not part of this RTL. Their connections are
// ports: s_axi_* is the processor's AXI4-Lite master, dma_lite_* goes to the
// DMA's register port, s_axis_mm2s_* comes from the DMA's read stream,
// m_axis_s2mm_* goes to its write stream, and peripheral_aresetn is the
// synchronised reset for the DMA. Everything runs on FCLK_CLK0.
// Timing: see matmult_accel; the control path adds a few cycles per
// register access. Block set, addresses and clock/reset wiring follow the
// published block design; bringing the DMA's side out as ports is this
// design's choice.
module design_matmult_accel
  import mm_pkg::*;
#(
  parameter int unsigned N      = DEF_N,
  parameter int unsigned DWIDTH = DEF_DWIDTH,
  parameter int unsigned LANES  = DEF_LANES
) (
  input  logic                FCLK_CLK0,
  input  logic                FCLK_RESET0_N,
  // AXI4-Lite from the processor
  input  logic [31:0]         s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [31:0]         s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // AXI4-Lite to the DMA's registers
  output logic [31:0]         dma_lite_awaddr,
  output logic                dma_lite_awvalid,
  input  logic                dma_lite_awready,
  output logic [31:0]         dma_lite_wdata,
  output logic [3:0]          dma_lite_wstrb,
  output logic                dma_lite_wvalid,
  input  logic                dma_lite_wready,
  input  logic [1:0]          dma_lite_bresp,
  input  logic                dma_lite_bvalid,
  output logic                dma_lite_bready,
  output logic [31:0]         dma_lite_araddr,
  output logic                dma_lite_arvalid,
  input  logic                dma_lite_arready,
  input  logic [31:0]         dma_lite_rdata,
  input  logic [1:0]          dma_lite_rresp,
  input  logic                dma_lite_rvalid,
  output logic                dma_lite_rready,
  // stream from the DMA (MM2S): A then B
  input  logic [DWIDTH-1:0]   s_axis_mm2s_tdata,
  input  logic [DWIDTH/8-1:0] s_axis_mm2s_tkeep,
  input  logic                s_axis_mm2s_tlast,
  input  logic                s_axis_mm2s_tvalid,
  output logic                s_axis_mm2s_tready,
  // stream to the DMA (S2MM): C
  output logic [DWIDTH-1:0]   m_axis_s2mm_tdata,
  output logic [DWIDTH/8-1:0] m_axis_s2mm_tkeep,
  output logic                m_axis_s2mm_tlast,
  output logic                m_axis_s2mm_tvalid,
  input  logic                m_axis_s2mm_tready,
  output logic                interrupt,
  output logic                peripheral_aresetn
);

  localparam int unsigned IDX_IP  = 0;
  localparam int unsigned IDX_DMA = 1;

  logic interconnect_aresetn, periph_rstn;
  logic unused_rst;

  proc_sys_reset u_rst (
    .slowest_sync_clk(FCLK_CLK0), .ext_reset_in(FCLK_RESET0_N),
    .aux_reset_in(1'b1), .mb_debug_sys_rst(1'b0), .dcm_locked(1'b1),
    .mb_reset(unused_rst), .bus_struct_reset(), .peripheral_reset(),
    .interconnect_aresetn(interconnect_aresetn), .peripheral_aresetn(periph_rstn)
  );
  assign peripheral_aresetn = periph_rstn;

  logic [1:0][31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [1:0][3:0]  m_wstrb;
  logic [1:0][1:0]  m_bresp, m_rresp;
  logic [1:0]       m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [1:0]       m_arvalid, m_arready, m_rvalid, m_rready;

  axil_interconnect #(
    .NM(2),
    .BASE({32'h41E0_0000, 32'h4000_0000}),
    .SIZE({32'h0001_0000, 32'h0001_0000})
  ) u_xbar (
    .clk(FCLK_CLK0), .rst_n(interconnect_aresetn),
    .s_awaddr(s_axi_awaddr), .s_awvalid(s_axi_awvalid), .s_awready(s_axi_awready),
    .s_wdata(s_axi_wdata), .s_wstrb(s_axi_wstrb), .s_wvalid(s_axi_wvalid),
    .s_wready(s_axi_wready), .s_bresp(s_axi_bresp), .s_bvalid(s_axi_bvalid),
    .s_bready(s_axi_bready), .s_araddr(s_axi_araddr), .s_arvalid(s_axi_arvalid),
    .s_arready(s_axi_arready), .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp),
    .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .m_awaddr(m_awaddr), .m_awvalid(m_awvalid), .m_awready(m_awready),
    .m_wdata(m_wdata), .m_wstrb(m_wstrb), .m_wvalid(m_wvalid), .m_wready(m_wready),
    .m_bresp(m_bresp), .m_bvalid(m_bvalid), .m_bready(m_bready),
    .m_araddr(m_araddr), .m_arvalid(m_arvalid), .m_arready(m_arready),
    .m_rdata(m_rdata), .m_rresp(m_rresp), .m_rvalid(m_rvalid), .m_rready(m_rready)
  );

  // DMA register port
  assign dma_lite_awaddr  = m_awaddr[IDX_DMA];
  assign dma_lite_awvalid = m_awvalid[IDX_DMA];
  assign dma_lite_wdata   = m_wdata[IDX_DMA];
  assign dma_lite_wstrb   = m_wstrb[IDX_DMA];
  assign dma_lite_wvalid  = m_wvalid[IDX_DMA];
  assign dma_lite_bready  = m_bready[IDX_DMA];
  assign dma_lite_araddr  = m_araddr[IDX_DMA];
  assign dma_lite_arvalid = m_arvalid[IDX_DMA];
  assign dma_lite_rready  = m_rready[IDX_DMA];
  assign m_awready[IDX_DMA] = dma_lite_awready;
  assign m_wready[IDX_DMA]  = dma_lite_wready;
  assign m_bresp[IDX_DMA]   = dma_lite_bresp;
  assign m_bvalid[IDX_DMA]  = dma_lite_bvalid;
  assign m_arready[IDX_DMA] = dma_lite_arready;
  assign m_rdata[IDX_DMA]   = dma_lite_rdata;
  assign m_rresp[IDX_DMA]   = dma_lite_rresp;
  assign m_rvalid[IDX_DMA]  = dma_lite_rvalid;

  logic [DWIDTH/8-1:0] out_tstrb_unused;

  matmult_accel #(.N(N), .DWIDTH(DWIDTH), .LANES(LANES)) u_accel (
    .ap_clk(FCLK_CLK0), .ap_rst_n(periph_rstn),
    .s_axi_control_awaddr(m_awaddr[IDX_IP][5:0]),
    .s_axi_control_awvalid(m_awvalid[IDX_IP]),
    .s_axi_control_awready(m_awready[IDX_IP]),
    .s_axi_control_wdata(m_wdata[IDX_IP]),
    .s_axi_control_wstrb(m_wstrb[IDX_IP]),
    .s_axi_control_wvalid(m_wvalid[IDX_IP]),
    .s_axi_control_wready(m_wready[IDX_IP]),
    .s_axi_control_bresp(m_bresp[IDX_IP]),
    .s_axi_control_bvalid(m_bvalid[IDX_IP]),
    .s_axi_control_bready(m_bready[IDX_IP]),
    .s_axi_control_araddr(m_araddr[IDX_IP][5:0]),
    .s_axi_control_arvalid(m_arvalid[IDX_IP]),
    .s_axi_control_arready(m_arready[IDX_IP]),
    .s_axi_control_rdata(m_rdata[IDX_IP]),
    .s_axi_control_rresp(m_rresp[IDX_IP]),
    .s_axi_control_rvalid(m_rvalid[IDX_IP]),
    .s_axi_control_rready(m_rready[IDX_IP]),
    .in_r_tdata(s_axis_mm2s_tdata), .in_r_tkeep(s_axis_mm2s_tkeep),
    .in_r_tstrb(s_axis_mm2s_tkeep), .in_r_tlast(s_axis_mm2s_tlast),
    .in_r_tvalid(s_axis_mm2s_tvalid), .in_r_tready(s_axis_mm2s_tready),
    .out_r_tdata(m_axis_s2mm_tdata), .out_r_tkeep(m_axis_s2mm_tkeep),
    .out_r_tstrb(out_tstrb_unused), .out_r_tlast(m_axis_s2mm_tlast),
    .out_r_tvalid(m_axis_s2mm_tvalid), .out_r_tready(m_axis_s2mm_tready),
    .interrupt(interrupt)
  );

endmodule
