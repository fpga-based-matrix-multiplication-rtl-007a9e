// Self-checking test of matmult_accel at N = 32 (64 beats per matrix),
// DWIDTH = 512, LANES = 32. Runs:
//   1. ap_start only, no stalls: C must equal the sequential-k float
//      reference bit for bit; the gap from the last input beat to the first
//      output beat must be N*N*N/LANES + 6 cycles, and the output must run at
//      one beat per cycle; ap_start must clear, done/idle must be reported.
//   2. auto_restart: two pairs of matrices back to back with random input
//      stalls and output back-pressure; both results checked.
// Also checked: no output before the inputs are complete, TLAST/TKEEP, and
// the completion interrupt.
module tb_matmult_accel;
  import tb_fp_ref_pkg::*;

  localparam int N = 32, DWIDTH = 512, LANES = 32;
  localparam int BEATS = N * N / (DWIDTH / 32);

  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [DWIDTH-1:0] in_tdata, out_tdata;
  logic [DWIDTH/8-1:0] in_tkeep, out_tkeep, out_tstrb;
  logic in_tlast, in_tvalid, in_tready, out_tlast, out_tvalid, out_tready, interrupt;

  int checks = 0, failures = 0;
  logic [31:0] R [N][N];

  matmult_accel #(.N(N), .DWIDTH(DWIDTH), .LANES(LANES)) dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_control_awaddr(awaddr), .s_axi_control_awvalid(awvalid),
    .s_axi_control_awready(awready), .s_axi_control_wdata(wdata),
    .s_axi_control_wstrb(wstrb), .s_axi_control_wvalid(wvalid),
    .s_axi_control_wready(wready), .s_axi_control_bresp(bresp),
    .s_axi_control_bvalid(bvalid), .s_axi_control_bready(bready),
    .s_axi_control_araddr(araddr), .s_axi_control_arvalid(arvalid),
    .s_axi_control_arready(arready), .s_axi_control_rdata(rdata),
    .s_axi_control_rresp(rresp), .s_axi_control_rvalid(rvalid),
    .s_axi_control_rready(rready),
    .in_r_tdata(in_tdata), .in_r_tkeep(in_tkeep), .in_r_tstrb(in_tkeep),
    .in_r_tlast(in_tlast), .in_r_tvalid(in_tvalid), .in_r_tready(in_tready),
    .out_r_tdata(out_tdata), .out_r_tkeep(out_tkeep), .out_r_tstrb(out_tstrb),
    .out_r_tlast(out_tlast), .out_r_tvalid(out_tvalid), .out_r_tready(out_tready),
    .interrupt(interrupt)
  );

  tb_axil_master #(.AW(6)) m (
    .clk(clk), .awaddr(awaddr), .awvalid(awvalid), .awready(awready),
    .wdata(wdata), .wstrb(wstrb), .wvalid(wvalid), .wready(wready),
    .bresp(bresp), .bvalid(bvalid), .bready(bready),
    .araddr(araddr), .arvalid(arvalid), .arready(arready),
    .rdata(rdata), .rresp(rresp), .rvalid(rvalid), .rready(rready)
  );

  tb_axis_mm_host #(.N(N), .DWIDTH(DWIDTH)) h (
    .clk(clk),
    .src_tdata(in_tdata), .src_tkeep(in_tkeep), .src_tlast(in_tlast),
    .src_tvalid(in_tvalid), .src_tready(in_tready),
    .snk_tdata(out_tdata), .snk_tkeep(out_tkeep), .snk_tlast(out_tlast),
    .snk_tvalid(out_tvalid), .snk_tready(out_tready)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
        h.A[i][j] = wide ? rand_norm(118, 16) : rand_unit();
        h.B[i][j] = wide ? rand_norm(118, 16) : rand_unit();
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        R[i][j] = 32'h0;
        for (int k = 0; k < N; k++) R[i][j] = ref_add(R[i][j], ref_mul(h.A[i][k], h.B[k][j]));
      end
  endtask

  task automatic check_result();
    int bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (h.C[i][j] !== R[i][j]) begin
          bad++; failures++;
          if (bad < 5) $display("C[%0d][%0d] = %h expected %h", i, j, h.C[i][j], R[i][j]);
        end
      end
  endtask

  // no output beat may appear before a run's inputs are all in
  int in_beats = 0;
  always @(negedge clk) begin
    if (in_tvalid && in_tready) in_beats++;
    if (out_tvalid && (in_beats % (2 * BEATS) != 0 || in_beats == 0)) begin
      checks++; failures++;
      $display("output offered before the inputs were complete");
    end
  end

  logic [31:0] d;
  logic [1:0] r;
  int rx0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    m.read(6'h00, d, r);
    expect_eq("idle after reset", d, 32'h4);
    m.write(6'h04, 1, r);            // GIE
    m.write(6'h08, 1, r);            // IER: done
    // run 1: no stalls
    make_operands(0);
    m.write(6'h00, 32'h1, r);
    h.send();
    wait (h.rx_matrices == 1);
    check_result();
    expect_eq("compute gap (cycles)", 32'(h.first_rx_cycle - h.last_tx_cycle), 32'(N * N * N / LANES + 6));
    expect_eq("output at one beat per cycle", 32'(h.last_rx_cycle - h.first_rx_cycle), 32'(BEATS - 1));
    repeat (3) @(posedge clk);
    expect_eq("interrupt", 32'(interrupt), 1);
    m.read(6'h00, d, r);
    expect_eq("CTRL after run", d, 32'hE);
    m.write(6'h0C, 1, r);
    expect_eq("interrupt cleared", 32'(interrupt), 0);
    // runs 2 and 3: auto restart with stalls on both streams
    h.src_stall_pct = 30; h.snk_stall_pct = 40;
    m.write(6'h00, 32'h81, r);
    for (int run = 0; run < 2; run++) begin
      rx0 = h.rx_matrices;
      make_operands(run == 0);
      h.send();
      wait (h.rx_matrices == rx0 + 1);
      check_result();
    end
    m.read(6'h00, d, r);
    expect_eq("auto_restart still set", d & 32'h81, 32'h81);
    expect_eq("stream protocol errors", 32'(h.proto_errors), 0);
    checks++;
    if (h.src_stalls == 0 || h.snk_stalls == 0) begin
      failures++; $display("stalls not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
