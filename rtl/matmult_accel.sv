// Matrix multiplication IP: C = A x B for N x N single-precision matrices
// moved over AXI4-Stream, started and watched over AXI4-Lite.
//
// One run has four phases, in the order of the accelerator's function:
//   LOAD_A   N*N/EPB beats from in_r fill buffer A (EPB = DWIDTH/32 floats
//            per beat, element j of a beat in bits 32j+31:32j, row-major)
//   LOAD_B   the next N*N/EPB beats fill buffer B
//   COMPUTE  the kernel multiplies, LANES multiply-accumulates per cycle
//   WRITE_C  N*N/EPB beats of C leave on out_r, TLAST on the last, TKEEP and
//            TSTRB all ones
// Computation starts only once both matrices are in. in_r_tready is high
// throughout the two load phases, so the input runs at one beat per cycle
// whenever the source offers one; out_r_tvalid is high throughout WRITE_C
// and the output advances on each accepted beat. The input's TLAST, TKEEP
// and TSTRB are not used: beats are counted, as the accelerator does.
// A run starts when ap_start (CTRL bit 0) is set; its end raises ap_done and
// ap_ready. With auto_restart (CTRL bit 7) the IP returns to LOAD_A for the
// next pair of matrices. At the defaults one run takes 2048 input beats,
// 65536 + 4 compute cycles and 1024 output beats, plus a few cycles of
// phase changes.
// Stream widths, matrix size, the phase order and the element type are the
// accelerator's; the buffer word shapes and the lane count are explained in
// mmult_kernel.
module matmult_accel
  import mm_pkg::*;
#(
  parameter int unsigned N       = DEF_N,
  parameter int unsigned DWIDTH  = DEF_DWIDTH,
  parameter int unsigned LANES   = DEF_LANES,
  parameter int unsigned CADDR_W = 6,
  localparam int unsigned EPB    = DWIDTH / FP_W,
  localparam int unsigned SPW    = LANES / EPB,        // beats per B/C word
  localparam int unsigned BEATS  = N * N / EPB,
  localparam int unsigned AWA    = $clog2(N * N / EPB),
  localparam int unsigned AWB    = $clog2(N * N / LANES),
  localparam int unsigned BW     = $clog2(BEATS) + 1
) (
  input  logic                 ap_clk,
  input  logic                 ap_rst_n,
  // s_axi_control
  input  logic [CADDR_W-1:0]   s_axi_control_awaddr,
  input  logic                 s_axi_control_awvalid,
  output logic                 s_axi_control_awready,
  input  logic [31:0]          s_axi_control_wdata,
  input  logic [3:0]           s_axi_control_wstrb,
  input  logic                 s_axi_control_wvalid,
  output logic                 s_axi_control_wready,
  output logic [1:0]           s_axi_control_bresp,
  output logic                 s_axi_control_bvalid,
  input  logic                 s_axi_control_bready,
  input  logic [CADDR_W-1:0]   s_axi_control_araddr,
  input  logic                 s_axi_control_arvalid,
  output logic                 s_axi_control_arready,
  output logic [31:0]          s_axi_control_rdata,
  output logic [1:0]           s_axi_control_rresp,
  output logic                 s_axi_control_rvalid,
  input  logic                 s_axi_control_rready,
  // in_r: matrices A then B
  input  logic [DWIDTH-1:0]    in_r_tdata,
  input  logic [DWIDTH/8-1:0]  in_r_tkeep,
  input  logic [DWIDTH/8-1:0]  in_r_tstrb,
  input  logic                 in_r_tlast,
  input  logic                 in_r_tvalid,
  output logic                 in_r_tready,
  // out_r: matrix C
  output logic [DWIDTH-1:0]    out_r_tdata,
  output logic [DWIDTH/8-1:0]  out_r_tkeep,
  output logic [DWIDTH/8-1:0]  out_r_tstrb,
  output logic                 out_r_tlast,
  output logic                 out_r_tvalid,
  input  logic                 out_r_tready,
  output logic                 interrupt
);

  mm_state_e state_q;
  logic [BW-1:0] beat_q;
  logic ap_start, ap_done, ap_idle, kstart, kbusy, kdone;
  logic in_fire, out_fire, last_beat;

  // buffer ports
  logic [AWA-1:0]        a_raddr;
  logic [DWIDTH-1:0]     a_rdata;
  logic [AWB-1:0]        b_raddr, c_waddr, c_raddr;
  logic [LANES*FP_W-1:0] b_rdata, c_wdata, c_rdata;
  logic                  c_we;
  logic [SPW-1:0]        seg_mask;

  mm_ctrl_regs #(.ADDR_W(CADDR_W)) u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_awaddr(s_axi_control_awaddr), .s_awvalid(s_axi_control_awvalid),
    .s_awready(s_axi_control_awready),
    .s_wdata(s_axi_control_wdata), .s_wstrb(s_axi_control_wstrb),
    .s_wvalid(s_axi_control_wvalid), .s_wready(s_axi_control_wready),
    .s_bresp(s_axi_control_bresp), .s_bvalid(s_axi_control_bvalid),
    .s_bready(s_axi_control_bready),
    .s_araddr(s_axi_control_araddr), .s_arvalid(s_axi_control_arvalid),
    .s_arready(s_axi_control_arready),
    .s_rdata(s_axi_control_rdata), .s_rresp(s_axi_control_rresp),
    .s_rvalid(s_axi_control_rvalid), .s_rready(s_axi_control_rready),
    .ap_start(ap_start), .ap_done(ap_done), .ap_ready(ap_done),
    .ap_idle(ap_idle), .interrupt(interrupt)
  );

  assign in_r_tready = (state_q == ST_LOAD_A) || (state_q == ST_LOAD_B);
  assign in_fire     = in_r_tvalid && in_r_tready;
  assign out_fire    = out_r_tvalid && out_r_tready;
  assign last_beat   = (beat_q == BW'(BEATS - 1));
  assign ap_idle     = (state_q == ST_IDLE);
  assign ap_done     = (state_q == ST_DONE);

  always_ff @(posedge ap_clk or negedge ap_rst_n) begin
    if (!ap_rst_n) begin
      state_q <= ST_IDLE;
      beat_q  <= '0;
      kstart  <= 1'b0;
    end else begin
      kstart <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (ap_start) begin
          state_q <= ST_LOAD_A;
          beat_q  <= '0;
        end
        ST_LOAD_A: if (in_fire) begin
          beat_q <= last_beat ? '0 : beat_q + 1'b1;
          if (last_beat) state_q <= ST_LOAD_B;
        end
        ST_LOAD_B: if (in_fire) begin
          beat_q <= last_beat ? '0 : beat_q + 1'b1;
          if (last_beat) begin
            state_q <= ST_COMPUTE;
            kstart  <= 1'b1;
          end
        end
        ST_COMPUTE: if (kdone) state_q <= ST_WRITE_C;
        ST_WRITE_C: if (out_fire) begin
          beat_q <= last_beat ? '0 : beat_q + 1'b1;
          if (last_beat) state_q <= ST_DONE;
        end
        ST_DONE: state_q <= ST_IDLE;
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // local buffers
  assign seg_mask = SPW'(1) << (32'(beat_q) % SPW);

  sdp_ram #(.WORDS(N * N / EPB), .SEG_W(DWIDTH), .SEGS(1)) u_buf_a (
    .clk(ap_clk), .we(in_fire && state_q == ST_LOAD_A), .wmask(1'b1),
    .waddr(AWA'(beat_q)), .wdata(in_r_tdata), .raddr(a_raddr), .rdata(a_rdata)
  );

  sdp_ram #(.WORDS(N * N / LANES), .SEG_W(DWIDTH), .SEGS(SPW)) u_buf_b (
    .clk(ap_clk), .we(in_fire && state_q == ST_LOAD_B), .wmask(seg_mask),
    .waddr(AWB'(32'(beat_q) / SPW)), .wdata({SPW{in_r_tdata}}),
    .raddr(b_raddr), .rdata(b_rdata)
  );

  sdp_ram #(.WORDS(N * N / LANES), .SEG_W(DWIDTH), .SEGS(SPW)) u_buf_c (
    .clk(ap_clk), .we(c_we), .wmask({SPW{1'b1}}),
    .waddr(c_waddr), .wdata(c_wdata), .raddr(c_raddr), .rdata(c_rdata)
  );

  mmult_kernel #(.N(N), .LANES(LANES), .EPB(EPB)) u_kernel (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(kstart), .busy(kbusy), .done(kdone),
    .a_raddr(a_raddr), .a_rdata(a_rdata), .b_raddr(b_raddr), .b_rdata(b_rdata),
    .c_we(c_we), .c_waddr(c_waddr), .c_wdata(c_wdata)
  );

  // output stream
  assign c_raddr      = AWB'(32'(beat_q) / SPW);
  assign out_r_tdata  = c_rdata[(32'(beat_q) % SPW) * DWIDTH +: DWIDTH];
  assign out_r_tvalid = (state_q == ST_WRITE_C);
  assign out_r_tlast  = (state_q == ST_WRITE_C) && last_beat;
  assign out_r_tkeep  = '1;
  assign out_r_tstrb  = '1;

  // AXI4-Stream rule: an offered beat stays, unchanged, until taken
  a_out_hold: assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                out_r_tvalid && !out_r_tready |=> out_r_tvalid && $stable(out_r_tdata)
                                                  && $stable(out_r_tlast));
  a_kernel_quiet: assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                    state_q != ST_COMPUTE |-> !c_we);

  initial begin
    assert (LANES % EPB == 0) else $error("LANES must be a multiple of DWIDTH/32");
  end

endmodule
