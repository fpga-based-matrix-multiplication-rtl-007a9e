// Repeated-run workload on design_matmult_accel at its defaults: 50
// consecutive 128 x 128 single-precision products of fresh random matrices in
// [0,1), started by a single ap_start | auto_restart write, the way a host
// benchmark loop would run them. Every product is checked bit for bit against
// the sequential-k float reference; every run must show the same compute gap
// (65542 cycles) and one output beat per cycle. The cycles per product, from
// the first input beat to the last beat of C, are collected and their
// minimum, maximum and mean printed with the time at the 50 MHz fabric clock.
module tb_benchmark_runs;
  import tb_fp_ref_pkg::*;

  localparam int N = 128, DWIDTH = 512, LANES = 32;
  localparam int BEATS = N * N / (DWIDTH / 32);
  localparam logic [31:0] IP = 32'h4000_0000;

  logic clk = 0, rstn_in = 0;
  logic [31:0] awaddr, araddr, wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] d_awaddr, d_wdata, d_araddr;
  logic [3:0] d_wstrb;
  logic d_awvalid, d_wvalid, d_bready, d_arvalid, d_rready;
  logic [DWIDTH-1:0] in_tdata, out_tdata;
  logic [DWIDTH/8-1:0] in_tkeep, out_tkeep;
  logic in_tlast, in_tvalid, in_tready, out_tlast, out_tvalid, out_tready;
  logic interrupt, periph_rstn;

  int checks = 0, failures = 0;
  logic [31:0] R [N][N];

  design_matmult_accel dut (
    .FCLK_CLK0(clk), .FCLK_RESET0_N(rstn_in),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .dma_lite_awaddr(d_awaddr), .dma_lite_awvalid(d_awvalid), .dma_lite_awready(1'b1),
    .dma_lite_wdata(d_wdata), .dma_lite_wstrb(d_wstrb), .dma_lite_wvalid(d_wvalid),
    .dma_lite_wready(1'b1), .dma_lite_bresp(2'b00), .dma_lite_bvalid(1'b0),
    .dma_lite_bready(d_bready), .dma_lite_araddr(d_araddr), .dma_lite_arvalid(d_arvalid),
    .dma_lite_arready(1'b1), .dma_lite_rdata(32'h0), .dma_lite_rresp(2'b00),
    .dma_lite_rvalid(1'b0), .dma_lite_rready(d_rready),
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

  tb_axis_mm_host #(.N(N), .DWIDTH(DWIDTH)) dma (
    .clk(clk),
    .src_tdata(in_tdata), .src_tkeep(in_tkeep), .src_tlast(in_tlast),
    .src_tvalid(in_tvalid), .src_tready(in_tready),
    .snk_tdata(out_tdata), .snk_tkeep(out_tkeep), .snk_tlast(out_tlast),
    .snk_tvalid(out_tvalid), .snk_tready(out_tready)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
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

  localparam int RUNS = 50;
  logic [1:0] r;
  int bad, t0, cyc, cmin, cmax;
  longint csum;

  initial begin
    cmin = 1 << 30; cmax = 0; csum = 0;
    repeat (4) @(posedge clk);
    rstn_in <= 1;
    wait (periph_rstn);
    ps.write(IP, 32'h81, r);
    for (int run = 0; run < RUNS; run++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          dma.A[i][j] = rand_unit();
          dma.B[i][j] = rand_unit();
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          R[i][j] = 32'h0;
          for (int k = 0; k < N; k++) R[i][j] = ref_add(R[i][j], ref_mul(dma.A[i][k], dma.B[k][j]));
        end
      t0 = dma.cycle;
      dma.send();
      wait (dma.rx_matrices == run + 1);
      cyc = dma.last_rx_cycle - t0;
      csum += longint'(cyc);
      if (cyc < cmin) cmin = cyc;
      if (cyc > cmax) cmax = cyc;
      bad = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (dma.C[i][j] !== R[i][j]) begin
            bad++; failures++;
            if (bad < 3) $display("run %0d: C[%0d][%0d] = %h expected %h", run, i, j, dma.C[i][j], R[i][j]);
          end
        end
      expect_eq("compute gap (cycles)", 32'(dma.first_rx_cycle - dma.last_tx_cycle),
                32'(N * N * N / LANES + 6));
      expect_eq("output at one beat per cycle", 32'(dma.last_rx_cycle - dma.first_rx_cycle),
                32'(BEATS - 1));
    end
    expect_eq("products received", 32'(dma.rx_matrices), RUNS);
    expect_eq("stream protocol errors", 32'(dma.proto_errors), 0);
    $display("%0d products: cycles per product min %0d max %0d mean %0.1f (%0.3f ms at 50 MHz)",
             RUNS, cmin, cmax, real'(csum) / RUNS, real'(csum) / RUNS / 50.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
