// Self-checking test of mm_ctrl_regs. A model core answers ap_start by
// dropping ap_idle, and some cycles later pulses ap_done/ap_ready. Checked:
// ap_start set by a CTRL write and cleared by ap_ready; ap_done and
// ap_ready read as 1 once, then cleared by that read; ap_idle reflected;
// auto_restart keeps ap_start set and the core re-runs on its own; GIE,
// IER, ISR read back, ISR set by events only when enabled, toggled by
// writes, and the interrupt line follows GIE & IER & ISR.
module tb_mm_ctrl_regs;
  localparam int AW = 6;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic ap_start, ap_done = 0, ap_ready = 0, ap_idle = 1, interrupt;

  int checks = 0, failures = 0, runs = 0;

  mm_ctrl_regs #(.ADDR_W(AW)) dut (.*);

  tb_axil_master #(.AW(AW)) m (
    .clk(clk), .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model core: a run takes 20 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && ap_start && ap_idle) begin
        ap_idle <= 0;
        repeat (20) @(posedge clk);
        ap_done <= 1; ap_ready <= 1;
        @(posedge clk);
        ap_done <= 0; ap_ready <= 0; ap_idle <= 1;
        runs++;
      end
    end
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    m.read(6'h00, d, r);
    expect_eq("CTRL after reset", d, 32'h4);          // idle only
    expect_eq("resp", 32'(r), 0);
    // enable the done interrupt
    m.write(6'h04, 1, r);
    m.write(6'h08, 32'h1, r);
    m.read(6'h04, d, r); expect_eq("GIE", d, 1);
    m.read(6'h08, d, r); expect_eq("IER", d, 1);
    // one run
    m.write(6'h00, 32'h1, r);
    expect_eq("write resp", 32'(r), 0);
    m.read(6'h00, d, r);
    expect_eq("CTRL running", d & 32'h85, 32'h1);      // start set, not idle
    expect_eq("irq low while running", 32'(interrupt), 0);
    wait (runs == 1);
    repeat (2) @(posedge clk);
    expect_eq("irq after done", 32'(interrupt), 1);
    m.read(6'h00, d, r);
    expect_eq("CTRL done", d, 32'hE);                  // done, idle, ready; start cleared
    m.read(6'h00, d, r);
    expect_eq("CTRL done cleared on read", d, 32'h4);
    m.read(6'h0C, d, r); expect_eq("ISR", d, 1);
    m.write(6'h0C, 32'h1, r);                          // toggle to clear
    m.read(6'h0C, d, r); expect_eq("ISR cleared", d, 0);
    expect_eq("irq cleared", 32'(interrupt), 0);
    repeat (30) @(posedge clk);
    expect_eq("no restart without auto_restart", 32'(runs), 1);
    // auto-restart: start | auto_restart, as the host code does
    m.write(6'h00, 32'h81, r);
    wait (runs == 3);
    repeat (2) @(posedge clk);
    m.read(6'h00, d, r);
    expect_eq("auto_restart keeps start", d & 32'h81, 32'h81);
    m.read(6'h0C, d, r); expect_eq("ISR after auto runs", d, 1);
    // disable global enable: interrupt low even with ISR set
    m.write(6'h04, 0, r);
    expect_eq("irq masked by GIE", 32'(interrupt), 0);
    // stop auto restart, let the current run finish
    m.write(6'h00, 32'h0, r);
    wait (ap_idle && !ap_start);
    repeat (30) @(posedge clk);
    m.read(6'h00, d, r);
    expect_eq("stopped", d & 32'h85, 32'h4);
    // ready interrupt enable and an unknown offset
    m.write(6'h08, 32'h2, r);
    m.read(6'h08, d, r); expect_eq("IER ready", d, 2);
    m.read(6'h20, d, r); expect_eq("unknown offset", d, 0);
    // back-pressure on responses
    m.gap = 3;
    m.write(6'h04, 1, r);
    m.read(6'h04, d, r); expect_eq("GIE with slow master", d, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
