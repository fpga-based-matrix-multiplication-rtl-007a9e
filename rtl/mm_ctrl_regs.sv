// AXI4-Lite control and status registers of the matrix multiplication IP.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 CTRL  bit0 ap_start (R/W, cleared by ap_ready unless auto_restart)
//              bit1 ap_done  (R, set at the end of a run, cleared by a read)
//              bit2 ap_idle  (R)
//              bit3 ap_ready (R, set at the end of a run, cleared by a read)
//              bit7 auto_restart (R/W)
//   0x04 GIE   bit0 global interrupt enable
//   0x08 IER   bit0 done interrupt enable, bit1 ready interrupt enable
//   0x0C ISR   bit0 done, bit1 ready; set by the event when enabled in IER,
//              each bit toggled by writing 1
// interrupt = GIE & |(IER & ISR), a level.
// Writes accept address and data in any order and answer OKAY; reads answer
// one cycle after the address is taken. Unknown offsets read as 0.
// CTRL at 0x00 with ap_start in bit 0 and auto_restart in bit 7, and an
// optional completion interrupt, are the accelerator's; the other bits and
// registers follow the common HLS control layout and are this design's
// choice. Write strobes are ignored (full-word writes).
module mm_ctrl_regs
  import mm_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // block-level handshake with the core
  output logic              ap_start,
  input  logic              ap_done,
  input  logic              ap_ready,
  input  logic              ap_idle,
  output logic              interrupt
);

  logic              aw_have, w_have;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]       w_data;
  logic              do_write, do_read;
  logic [5:0]        wa, ra;

  logic       r_done, r_ready, r_auto, r_gie;
  logic [1:0] r_ier, r_isr;

  assign s_awready = !aw_have && !s_bvalid;
  assign s_wready  = !w_have && !s_bvalid;
  assign s_arready = !s_rvalid;
  assign s_bresp   = RESP_OKAY;
  assign s_rresp   = RESP_OKAY;

  assign do_write = aw_have && w_have && !s_bvalid;
  assign do_read  = s_arvalid && s_arready;
  assign wa       = 6'(aw_addr);
  assign ra       = 6'(s_araddr);

  // write channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0; w_have <= 1'b0; aw_addr <= '0; w_data <= '0;
      s_bvalid <= 1'b0;
    end else begin
      if (s_awvalid && s_awready) begin aw_have <= 1'b1; aw_addr <= s_awaddr; end
      if (s_wvalid && s_wready)   begin w_have  <= 1'b1; w_data  <= s_wdata;  end
      if (do_write) begin
        aw_have <= 1'b0; w_have <= 1'b0; s_bvalid <= 1'b1;
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end
    end
  end

  // registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start <= 1'b0; r_done <= 1'b0; r_ready <= 1'b0; r_auto <= 1'b0;
      r_gie <= 1'b0; r_ier <= '0; r_isr <= '0;
    end else begin
      // ap_start
      if (do_write && wa == REG_CTRL && w_data[CTRL_AP_START])
        ap_start <= 1'b1;
      else if (ap_ready && !r_auto)
        ap_start <= 1'b0;
      if (do_write && wa == REG_CTRL)
        r_auto <= w_data[CTRL_AUTO_RESTART];
      // status bits, clear on read of CTRL
      if (ap_done)                             r_done <= 1'b1;
      else if (do_read && ra == REG_CTRL)      r_done <= 1'b0;
      if (ap_ready)                            r_ready <= 1'b1;
      else if (do_read && ra == REG_CTRL)      r_ready <= 1'b0;
      // interrupt registers
      if (do_write && wa == REG_GIE) r_gie <= w_data[0];
      if (do_write && wa == REG_IER) r_ier <= w_data[1:0];
      r_isr[0] <= (r_ier[0] && ap_done)  ? 1'b1 :
                  (do_write && wa == REG_ISR) ? (r_isr[0] ^ w_data[0]) : r_isr[0];
      r_isr[1] <= (r_ier[1] && ap_ready) ? 1'b1 :
                  (do_write && wa == REG_ISR) ? (r_isr[1] ^ w_data[1]) : r_isr[1];
    end
  end

  // read channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0; s_rdata <= '0;
    end else begin
      if (do_read) begin
        s_rvalid <= 1'b1;
        unique case (ra)
          REG_CTRL: s_rdata <= {24'd0, r_auto, 3'd0, r_ready, ap_idle, r_done, ap_start};
          REG_GIE:  s_rdata <= {31'd0, r_gie};
          REG_IER:  s_rdata <= {30'd0, r_ier};
          REG_ISR:  s_rdata <= {30'd0, r_isr};
          default:  s_rdata <= '0;
        endcase
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  assign interrupt = r_gie && ((r_ier & r_isr) != 2'b00);

  // AXI4-Lite rule: a response, once valid, stays until taken
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                   s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                   s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
