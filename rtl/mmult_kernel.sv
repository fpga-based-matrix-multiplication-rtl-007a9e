// Matrix multiply kernel: C = A x B for N x N single-precision matrices held
// in the local buffers.
//
// The kernel walks the output matrix row by row (m) and, within a row, in
// groups of LANES adjacent columns (g). For each group it streams k = 0..N-1:
// every cycle one element A[m][k] is broadcast to all lanes and one row
// segment B[k][g*LANES +: LANES] is read, one element per lane. Lane l thus
// accumulates C[m][g*LANES+l] in the sequential order of k, which keeps the
// result bit-identical to the plain triple loop of the accelerator. When the
// last term leaves the lanes, the LANES sums are written into C as one word.
// One group follows the next without a gap, so a full product takes
// N*N*N/LANES issue cycles; `done` pulses four cycles after that count
// would end, i.e. exactly N*N*N/LANES + 4 cycles after the `start` pulse.
//
// Buffer layout (set by the loader in matmult_accel):
//   A: word (m*N+k)/EPB holds EPB consecutive elements of row m
//   B: word k*(N/LANES)+g holds B[k][g*LANES +: LANES]
//   C: word m*(N/LANES)+g holds C[m][g*LANES +: LANES]
// Reads are asynchronous; the read data is registered here.
// The loop order and float arithmetic follow the accelerator's kernel;
// LANES = 32 parallel MACs is inferred from its 160 DSP slices (32 multipliers
// and 32 adders); the group-wise schedule is this design's own.
module mmult_kernel
  import mm_pkg::*;
#(
  parameter int unsigned N     = DEF_N,
  parameter int unsigned LANES = DEF_LANES,
  parameter int unsigned EPB   = DEF_DWIDTH / FP_W,
  localparam int unsigned GROUPS = N / LANES,
  localparam int unsigned AWA    = $clog2(N * N / EPB),
  localparam int unsigned AWB    = $clog2(N * N / LANES),
  localparam int unsigned CW     = $clog2(N) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [AWA-1:0]        a_raddr,
  input  logic [EPB*FP_W-1:0]   a_rdata,
  output logic [AWB-1:0]        b_raddr,
  input  logic [LANES*FP_W-1:0] b_rdata,
  output logic                  c_we,
  output logic [AWB-1:0]        c_waddr,
  output logic [LANES*FP_W-1:0] c_wdata
);


  // issue counters
  logic          running;
  logic [CW-1:0] m_q, g_q, k_q;
  logic          issue_last_term, issue_final;

  // stage 0: registered operands
  logic                  s0_valid, s0_first, s0_last, s0_final;
  fp32_t                 s0_a;
  logic [LANES*FP_W-1:0] s0_b;
  logic [AWB-1:0]        s0_caddr;

  // delay of the C address and final flag to the lanes' outputs
  logic [AWB-1:0] caddr_d1, caddr_d2;
  logic           final_d1, final_d2;

  logic [LANES-1:0] lane_valid;
  logic             wr_final;

  assign issue_last_term = (k_q == CW'(N - 1));
  assign issue_final     = issue_last_term && (g_q == CW'(GROUPS - 1)) && (m_q == CW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      m_q <= '0; g_q <= '0; k_q <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        m_q <= '0; g_q <= '0; k_q <= '0;
      end
    end else begin
      if (!issue_last_term) begin
        k_q <= k_q + 1'b1;
      end else begin
        k_q <= '0;
        if (g_q != CW'(GROUPS - 1)) begin
          g_q <= g_q + 1'b1;
        end else begin
          g_q <= '0;
          m_q <= m_q + 1'b1;
        end
        if (issue_final) running <= 1'b0;
      end
    end
  end

  // addresses of the current term
  always_comb begin
    a_raddr = AWA'((32'(m_q) * N + 32'(k_q)) / EPB);
    b_raddr = AWB'(32'(k_q) * GROUPS + 32'(g_q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid <= 1'b0; s0_first <= 1'b0; s0_last <= 1'b0; s0_final <= 1'b0;
      s0_a <= '0; s0_b <= '0; s0_caddr <= '0;
      caddr_d1 <= '0; caddr_d2 <= '0; final_d1 <= 1'b0; final_d2 <= 1'b0;
      done <= 1'b0;
    end else begin
      s0_valid <= running;
      s0_first <= running && (k_q == '0);
      s0_last  <= running && issue_last_term;
      s0_final <= running && issue_final;
      s0_a     <= a_rdata[(32'(k_q) % EPB) * FP_W +: FP_W];
      s0_b     <= b_rdata;
      s0_caddr <= AWB'(32'(m_q) * GROUPS + 32'(g_q));
      caddr_d1 <= s0_caddr;  caddr_d2 <= caddr_d1;
      final_d1 <= s0_final;  final_d2 <= final_d1;
      done     <= wr_final;
    end
  end

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    mac_lane u_lane (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s0_valid),
      .in_first (s0_first),
      .in_last  (s0_last),
      .a        (s0_a),
      .b        (s0_b[l*FP_W +: FP_W]),
      .out_valid(lane_valid[l]),
      .acc      (c_wdata[l*FP_W +: FP_W])
    );
  end

  assign c_we     = lane_valid[0];
  assign c_waddr  = caddr_d2;
  assign wr_final = c_we && final_d2;
  assign busy     = running || s0_valid || (lane_valid != '0) || final_d1 || final_d2;

  // the group shape must tile the matrix
  initial begin
    assert (N % LANES == 0) else $error("N must be a multiple of LANES");
    assert (N % EPB == 0) else $error("N must be a multiple of EPB");
  end

endmodule
