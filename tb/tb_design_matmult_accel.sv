// End-to-end test of design_matmult_accel at N = 32 (DWIDTH = 512,
// LANES = 32), driven the way the host software drives the system: the
// processor (an AXI4-Lite master) enables the interrupt and writes
// ap_start | auto_restart to the IP at 0x4000_0000, the DMA (stream models
// plus a register slave on the DMA port) streams A and B in and takes C out.
// Every result is compared bit for bit with the sequential-k float reference.
// Mechanisms that must each happen at least once, counted:
//   input_stall      the source idles between beats
//   output_stall     the sink holds back TREADY while C is offered
//   auto_restart     a second product runs without a new ap_start write
//   interrupt        the completion interrupt rises and is cleared
//   dma_reg_access   a register access is routed to the DMA port
//   decode_error     an unmapped address answers DECERR
//   reset_recovery   FCLK_RESET0_N is pulsed and the system runs again
// Also checked: the compute gap of a stall-free run (N*N*N/LANES + 6 cycles
// between the last input beat and the first output beat) and the release of
// the synchronised reset.
module tb_design_matmult_accel;
  import tb_fp_ref_pkg::*;

  localparam int N = 32, DWIDTH = 512, LANES = 32;
  localparam logic [31:0] IP = 32'h4000_0000, DMA = 32'h41E0_0000;

  logic clk = 0, rstn_in = 0;
  logic [31:0] awaddr, araddr, wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] d_awaddr, d_wdata, d_araddr, d_rdata;
  logic [3:0] d_wstrb;
  logic [1:0] d_bresp, d_rresp;
  logic d_awvalid, d_awready, d_wvalid, d_wready, d_bvalid, d_bready;
  logic d_arvalid, d_arready, d_rvalid, d_rready;
  logic [DWIDTH-1:0] in_tdata, out_tdata;
  logic [DWIDTH/8-1:0] in_tkeep, out_tkeep;
  logic in_tlast, in_tvalid, in_tready, out_tlast, out_tvalid, out_tready;
  logic interrupt, periph_rstn;

  int checks = 0, failures = 0;
  int n_input_stall = 0, n_output_stall = 0, n_auto_restart = 0, n_interrupt = 0;
  int n_dma_reg = 0, n_decerr = 0, n_reset = 0;
  logic [31:0] R [N][N];

  design_matmult_accel #(.N(N), .DWIDTH(DWIDTH), .LANES(LANES)) dut (
    .FCLK_CLK0(clk), .FCLK_RESET0_N(rstn_in),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .dma_lite_awaddr(d_awaddr), .dma_lite_awvalid(d_awvalid), .dma_lite_awready(d_awready),
    .dma_lite_wdata(d_wdata), .dma_lite_wstrb(d_wstrb), .dma_lite_wvalid(d_wvalid),
    .dma_lite_wready(d_wready), .dma_lite_bresp(d_bresp), .dma_lite_bvalid(d_bvalid),
    .dma_lite_bready(d_bready), .dma_lite_araddr(d_araddr), .dma_lite_arvalid(d_arvalid),
    .dma_lite_arready(d_arready), .dma_lite_rdata(d_rdata), .dma_lite_rresp(d_rresp),
    .dma_lite_rvalid(d_rvalid), .dma_lite_rready(d_rready),
    .s_axis_mm2s_tdata(in_tdata), .s_axis_mm2s_tkeep(in_tkeep), .s_axis_mm2s_tlast(in_tlast),
    .s_axis_mm2s_tvalid(in_tvalid), .s_axis_mm2s_tready(in_tready),
    .m_axis_s2mm_tdata(out_tdata), .m_axis_s2mm_tkeep(out_tkeep),
    .m_axis_s2mm_tlast(out_tlast), .m_axis_s2mm_tvalid(out_tvalid),
    .m_axis_s2mm_tready(out_tready),
    .interrupt(interrupt), .peripheral_aresetn(periph_rstn)
  );

  tb_axil_master #(.AW(32)) ps (
    .clk(clk), .awaddr(awaddr), .awvalid(awvalid), .awready(awready),
    .wdata(wdata), .wstrb(wstrb), .wvalid(wvalid), .wready(wready),
    .bresp(bresp), .bvalid(bvalid), .bready(bready),
    .araddr(araddr), .arvalid(arvalid), .arready(arready),
    .rdata(rdata), .rresp(rresp), .rvalid(rvalid), .rready(rready)
  );

  tb_axil_slave dma_regs (
    .clk(clk), .rst_n(periph_rstn),
    .awaddr(d_awaddr), .awvalid(d_awvalid), .awready(d_awready),
    .wdata(d_wdata), .wstrb(d_wstrb), .wvalid(d_wvalid), .wready(d_wready),
    .bresp(d_bresp), .bvalid(d_bvalid), .bready(d_bready),
    .araddr(d_araddr), .arvalid(d_arvalid), .arready(d_arready),
    .rdata(d_rdata), .rresp(d_rresp), .rvalid(d_rvalid), .rready(d_rready)
  );

  tb_axis_mm_host #(.N(N), .DWIDTH(DWIDTH)) dma (
    .clk(clk),
    .src_tdata(in_tdata), .src_tkeep(in_tkeep), .src_tlast(in_tlast),
    .src_tvalid(in_tvalid), .src_tready(in_tready),
    .snk_tdata(out_tdata), .snk_tkeep(out_tkeep), .snk_tlast(out_tlast),
    .snk_tvalid(out_tvalid), .snk_tready(out_tready)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic make_operands(bit wide);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        dma.A[i][j] = wide ? rand_norm(118, 16) : rand_unit();
        dma.B[i][j] = wide ? rand_norm(118, 16) : rand_unit();
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        R[i][j] = 32'h0;
        for (int k = 0; k < N; k++) R[i][j] = ref_add(R[i][j], ref_mul(dma.A[i][k], dma.B[k][j]));
      end
  endtask

  task automatic check_result();
    int bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (dma.C[i][j] !== R[i][j]) begin
          bad++; failures++;
          if (bad < 5) $display("C[%0d][%0d] = %h expected %h", i, j, dma.C[i][j], R[i][j]);
        end
      end
  endtask

  // one product through the DMA models
  task automatic run_product(bit wide);
    int rx0 = dma.rx_matrices;
    make_operands(wide);
    dma.send();
    wait (dma.rx_matrices == rx0 + 1);
    check_result();
  endtask

  task automatic reset_system();
    int n = 0;
    rstn_in <= 0;
    repeat (4) @(posedge clk);
    rstn_in <= 1;
    while (!periph_rstn) begin @(posedge clk); n++; end
    // raised at an edge, the request is first seen by the next one: HOLD + 4
    expect_eq("reset release (cycles)", 32'(n), 20);
  endtask

  logic [31:0] d;
  logic [1:0] r;

  initial begin
    reset_system();
    // DMA register traffic goes to the DMA port
    ps.write(DMA + 32'h30, 32'h0001_0001, r);     // an S2MM control register
    ps.read(DMA + 32'h30, d, r);
    expect_eq("DMA register read back", d, 32'h0001_0001);
    if (r == 2'b00 && dma_regs.writes == 1 && dma_regs.reads == 1) n_dma_reg++;
    // unmapped address
    ps.read(32'h4001_0000, d, r);
    if (r == 2'b11) n_decerr++;
    expect_eq("DECERR", 32'(r), 3);
    // the host sequence: interrupt on, start with auto_restart
    ps.write(IP + 32'h04, 1, r);
    ps.write(IP + 32'h08, 1, r);
    ps.read(IP, d, r);
    expect_eq("IP idle", d, 32'h4);
    ps.write(IP, 32'h81, r);
    // product 1: no stalls, timed
    run_product(0);
    expect_eq("compute gap (cycles)", 32'(dma.first_rx_cycle - dma.last_tx_cycle),
              32'(N * N * N / LANES + 6));
    repeat (3) @(posedge clk);
    if (interrupt) n_interrupt++;
    expect_eq("interrupt raised", 32'(interrupt), 1);
    ps.write(IP + 32'h0C, 1, r);
    expect_eq("interrupt cleared", 32'(interrupt), 0);
    // product 2: stalls on both streams, no new start
    dma.src_stall_pct = 25; dma.snk_stall_pct = 50;
    run_product(1);
    n_auto_restart++;
    if (dma.src_stalls > 0) n_input_stall++;
    if (dma.snk_stalls > 0) n_output_stall++;
    // reset the system, then start again with ap_start alone
    dma.src_stall_pct = 0; dma.snk_stall_pct = 0;
    reset_system();
    n_reset++;
    ps.read(IP, d, r);
    expect_eq("IP idle after reset", d, 32'h4);
    ps.write(IP, 32'h1, r);
    run_product(0);
    repeat (3) @(posedge clk);
    ps.read(IP, d, r);
    expect_eq("CTRL after single run", d, 32'hE);
    expect_eq("stream protocol errors", 32'(dma.proto_errors), 0);

    $display("mechanisms: input_stall=%0d output_stall=%0d auto_restart=%0d interrupt=%0d dma_reg_access=%0d decode_error=%0d reset_recovery=%0d",
             n_input_stall, n_output_stall, n_auto_restart, n_interrupt, n_dma_reg, n_decerr, n_reset);
    checks++; if (n_input_stall == 0)  begin failures++; $display("input_stall never happened"); end
    checks++; if (n_output_stall == 0) begin failures++; $display("output_stall never happened"); end
    checks++; if (n_auto_restart == 0) begin failures++; $display("auto_restart never happened"); end
    checks++; if (n_interrupt == 0)    begin failures++; $display("interrupt never happened"); end
    checks++; if (n_dma_reg == 0)      begin failures++; $display("dma_reg_access never happened"); end
    checks++; if (n_decerr == 0)       begin failures++; $display("decode_error never happened"); end
    checks++; if (n_reset == 0)        begin failures++; $display("reset_recovery never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
