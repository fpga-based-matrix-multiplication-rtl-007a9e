// Self-checking test of axil_interconnect with the published address map:
// two register slaves with random handshake delays sit at 0x4000_0000 and
// 0x41E0_0000. Random writes and reads to both windows must reach only the
// slave they address, with the address unchanged, and read back what was
// written; addresses outside both windows (just below, just above and far
// away) must answer DECERR and reach neither slave.
module tb_axil_interconnect;
  logic clk = 0, rst_n = 0;

  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;

  logic [1:0][31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [1:0][3:0]  m_wstrb;
  logic [1:0][1:0]  m_bresp, m_rresp;
  logic [1:0] m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [1:0] m_arvalid, m_arready, m_rvalid, m_rready;

  int checks = 0, failures = 0;

  axil_interconnect dut (.*);

  tb_axil_master #(.AW(32)) m (
    .clk(clk), .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready)
  );

  for (genvar j = 0; j < 2; j++) begin : g_slave
    tb_axil_slave u_s (
      .clk(clk), .rst_n(rst_n),
      .awaddr(m_awaddr[j]), .awvalid(m_awvalid[j]), .awready(m_awready[j]),
      .wdata(m_wdata[j]), .wstrb(m_wstrb[j]), .wvalid(m_wvalid[j]), .wready(m_wready[j]),
      .bresp(m_bresp[j]), .bvalid(m_bvalid[j]), .bready(m_bready[j]),
      .araddr(m_araddr[j]), .arvalid(m_arvalid[j]), .arready(m_arready[j]),
      .rdata(m_rdata[j]), .rresp(m_rresp[j]), .rvalid(m_rvalid[j]), .rready(m_rready[j])
    );
  end

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

  localparam logic [31:0] BASE [2] = '{32'h4000_0000, 32'h41E0_0000};
  logic [31:0] model [2][16];

  initial begin
    logic [31:0] d, addr, data;
    logic [1:0] r;
    int j, idx, w0, w1, r0, r1;
    foreach (model[a, b]) model[a][b] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      j = $urandom % 2; idx = $urandom % 16;
      addr = BASE[j] + 32'(idx * 4);
      w0 = g_slave[0].u_s.writes; w1 = g_slave[1].u_s.writes;
      r0 = g_slave[0].u_s.reads;  r1 = g_slave[1].u_s.reads;
      m.gap = $urandom % 3;
      if ($urandom % 2) begin
        data = $urandom;
        m.write(addr, data, r);
        model[j][idx] = data;
        expect_eq("write resp", 32'(r), 0);
        expect_eq("writes reached slave 0", 32'(g_slave[0].u_s.writes - w0), (j == 0) ? 1 : 0);
        expect_eq("writes reached slave 1", 32'(g_slave[1].u_s.writes - w1), (j == 1) ? 1 : 0);
        expect_eq("write address", (j == 0) ? g_slave[0].u_s.last_waddr : g_slave[1].u_s.last_waddr, addr);
      end else begin
        m.read(addr, d, r);
        expect_eq("read resp", 32'(r), 0);
        expect_eq("read data", d, model[j][idx]);
        expect_eq("reads reached slave 0", 32'(g_slave[0].u_s.reads - r0), (j == 0) ? 1 : 0);
        expect_eq("reads reached slave 1", 32'(g_slave[1].u_s.reads - r1), (j == 1) ? 1 : 0);
        expect_eq("read address", (j == 0) ? g_slave[0].u_s.last_raddr : g_slave[1].u_s.last_raddr, addr);
      end
    end
    // the last byte of each window still decodes
    m.write(32'h4000_FFFC, 32'h1234, r); expect_eq("top of IP window", 32'(r), 0);
    m.write(32'h41E0_FFFC, 32'h5678, r); expect_eq("top of DMA window", 32'(r), 0);
    // unmapped addresses
    foreach (BASE[k]) begin
      w0 = g_slave[0].u_s.writes + g_slave[1].u_s.writes;
      r0 = g_slave[0].u_s.reads + g_slave[1].u_s.reads;
      m.write(BASE[k] - 4, 32'hDEAD, r);       expect_eq("DECERR below", 32'(r), 3);
      m.write(BASE[k] + 32'h1_0000, 32'hDEAD, r); expect_eq("DECERR above", 32'(r), 3);
      m.read(BASE[k] + 32'h1_0000, d, r);      expect_eq("DECERR read", 32'(r), 3);
      m.read(32'h0000_0000, d, r);             expect_eq("DECERR read low", 32'(r), 3);
      expect_eq("no write reached a slave", 32'(g_slave[0].u_s.writes + g_slave[1].u_s.writes - w0), 0);
      expect_eq("no read reached a slave", 32'(g_slave[0].u_s.reads + g_slave[1].u_s.reads - r0), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
