// AXI4-Lite control interconnect: one master (the processor) to NM register
// slaves, routed by address.
//
// Slave port j answers the window BASE[j] .. BASE[j] + SIZE[j] - 1; the
// address is passed on unchanged. An address in no window is answered with
// DECERR and reaches no slave. One write and one read may be in flight at a
// time, independently. A write is taken once address and data are both
// offered; the address and data are then offered to the chosen slave until
// each is accepted, and the slave's response is passed back. A read is
// forwarded the same way. Each transfer costs a few cycles of latency, which
// is of no account for register traffic.
// The defaults are the published address map: the IP's control registers
// at 0x4000_0000 and the DMA's registers at 0x41E0_0000, 64 KiB each. The
// single-transaction routing is this design's own (the vendor interconnect
// it stands for is not described).
module axil_interconnect
  import mm_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter logic [NM-1:0][31:0] BASE = {32'h41E0_0000, 32'h4000_0000},
  parameter logic [NM-1:0][31:0] SIZE = {32'h0001_0000, 32'h0001_0000}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // from the master
  input  logic [31:0]           s_awaddr,
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  logic [31:0]           s_wdata,
  input  logic [3:0]            s_wstrb,
  input  logic                  s_wvalid,
  output logic                  s_wready,
  output logic [1:0]            s_bresp,
  output logic                  s_bvalid,
  input  logic                  s_bready,
  input  logic [31:0]           s_araddr,
  input  logic                  s_arvalid,
  output logic                  s_arready,
  output logic [31:0]           s_rdata,
  output logic [1:0]            s_rresp,
  output logic                  s_rvalid,
  input  logic                  s_rready,
  // to the slaves
  output logic [NM-1:0][31:0]   m_awaddr,
  output logic [NM-1:0]         m_awvalid,
  input  logic [NM-1:0]         m_awready,
  output logic [NM-1:0][31:0]   m_wdata,
  output logic [NM-1:0][3:0]    m_wstrb,
  output logic [NM-1:0]         m_wvalid,
  input  logic [NM-1:0]         m_wready,
  input  logic [NM-1:0][1:0]    m_bresp,
  input  logic [NM-1:0]         m_bvalid,
  output logic [NM-1:0]         m_bready,
  output logic [NM-1:0][31:0]   m_araddr,
  output logic [NM-1:0]         m_arvalid,
  input  logic [NM-1:0]         m_arready,
  input  logic [NM-1:0][31:0]   m_rdata,
  input  logic [NM-1:0][1:0]    m_rresp,
  input  logic [NM-1:0]         m_rvalid,
  output logic [NM-1:0]         m_rready
);

  localparam int unsigned SW = (NM > 1) ? $clog2(NM) : 1;

  typedef enum logic [1:0] {CH_IDLE, CH_FWD, CH_WAIT, CH_RESP} ch_state_e;

  // address decoder: hit flag and slave index
  function automatic logic [SW:0] decode(input logic [31:0] addr);
    decode = '0;
    for (int j = 0; j < int'(NM); j++)
      if (addr >= BASE[j] && (addr - BASE[j]) < SIZE[j])
        decode = {1'b1, SW'(j)};
  endfunction

  // ---------------- write path ----------------
  ch_state_e       w_state;
  logic [SW-1:0]   w_sel;
  logic [31:0]     w_addr, w_data;
  logic [3:0]      w_strb;
  logic            aw_done, wd_done;
  logic [SW:0]     w_dec;

  assign w_dec     = decode(s_awaddr);
  assign s_awready = (w_state == CH_IDLE) && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_state <= CH_IDLE; w_sel <= '0; w_addr <= '0; w_data <= '0; w_strb <= '0;
      aw_done <= 1'b0; wd_done <= 1'b0; s_bvalid <= 1'b0; s_bresp <= RESP_OKAY;
    end else begin
      unique case (w_state)
        CH_IDLE: if (s_awready) begin
          w_addr <= s_awaddr; w_data <= s_wdata; w_strb <= s_wstrb;
          w_sel  <= w_dec[SW-1:0];
          aw_done <= 1'b0; wd_done <= 1'b0;
          if (w_dec[SW]) begin
            w_state <= CH_FWD;
          end else begin
            s_bvalid <= 1'b1; s_bresp <= RESP_DECERR; w_state <= CH_RESP;
          end
        end
        CH_FWD: begin
          if (m_awvalid[w_sel] && m_awready[w_sel]) aw_done <= 1'b1;
          if (m_wvalid[w_sel] && m_wready[w_sel])   wd_done <= 1'b1;
          if ((aw_done || m_awready[w_sel]) && (wd_done || m_wready[w_sel]))
            w_state <= CH_WAIT;
        end
        CH_WAIT: if (m_bvalid[w_sel]) begin
          s_bvalid <= 1'b1; s_bresp <= m_bresp[w_sel]; w_state <= CH_RESP;
        end
        CH_RESP: if (s_bready) begin
          s_bvalid <= 1'b0; w_state <= CH_IDLE;
        end
        default: w_state <= CH_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int j = 0; j < int'(NM); j++) begin
      m_awaddr[j]  = w_addr;
      m_wdata[j]   = w_data;
      m_wstrb[j]   = w_strb;
      m_awvalid[j] = (w_state == CH_FWD) && (w_sel == SW'(j)) && !aw_done;
      m_wvalid[j]  = (w_state == CH_FWD) && (w_sel == SW'(j)) && !wd_done;
      m_bready[j]  = (w_state == CH_WAIT) && (w_sel == SW'(j));
    end
  end

  // ---------------- read path ----------------
  ch_state_e       r_state;
  logic [SW-1:0]   r_sel;
  logic [31:0]     r_addr;
  logic [SW:0]     r_dec;

  assign r_dec     = decode(s_araddr);
  assign s_arready = (r_state == CH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_state <= CH_IDLE; r_sel <= '0; r_addr <= '0;
      s_rvalid <= 1'b0; s_rresp <= RESP_OKAY; s_rdata <= '0;
    end else begin
      unique case (r_state)
        CH_IDLE: if (s_arvalid) begin
          r_addr <= s_araddr; r_sel <= r_dec[SW-1:0];
          if (r_dec[SW]) begin
            r_state <= CH_FWD;
          end else begin
            s_rvalid <= 1'b1; s_rresp <= RESP_DECERR; s_rdata <= '0; r_state <= CH_RESP;
          end
        end
        CH_FWD:  if (m_arready[r_sel]) r_state <= CH_WAIT;
        CH_WAIT: if (m_rvalid[r_sel]) begin
          s_rvalid <= 1'b1; s_rresp <= m_rresp[r_sel]; s_rdata <= m_rdata[r_sel];
          r_state <= CH_RESP;
        end
        CH_RESP: if (s_rready) begin
          s_rvalid <= 1'b0; r_state <= CH_IDLE;
        end
        default: r_state <= CH_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int j = 0; j < int'(NM); j++) begin
      m_araddr[j]  = r_addr;
      m_arvalid[j] = (r_state == CH_FWD) && (r_sel == SW'(j));
      m_rready[j]  = (r_state == CH_WAIT) && (r_sel == SW'(j));
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
              s_bvalid && !s_bready |=> s_bvalid && $stable(s_bresp));
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
              s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
