// Self-checking test of mmult_kernel at N = 32, LANES = 16, EPB = 4.
// The testbench plays the buffers: it holds A and B in the kernel's word
// layouts, answers reads combinationally and records the C words written.
// Two products are run (random floats in [0,1), then signed values of mixed
// magnitude); every C element must equal the sequential-k reference bit for
// bit, every C word must be written exactly once, and `done` must come
// exactly N*N*N/LANES + 4 cycles after `start`.
module tb_mmult_kernel;
  import tb_fp_ref_pkg::*;

  localparam int N = 32, LANES = 16, EPB = 4, G = N / LANES;
  localparam int AWA = $clog2(N * N / EPB), AWB = $clog2(N * N / LANES);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [AWA-1:0] a_raddr;
  logic [EPB*32-1:0] a_rdata;
  logic [AWB-1:0] b_raddr, c_waddr;
  logic [LANES*32-1:0] b_rdata, c_wdata;
  logic c_we;

  logic [31:0] A [N][N], B [N][N], C [N][N], R [N][N];
  int wr_count [N*N/LANES];
  int checks = 0, failures = 0, cycle = 0;

  mmult_kernel #(.N(N), .LANES(LANES), .EPB(EPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer model
  always_comb begin
    for (int e = 0; e < EPB; e++)
      a_rdata[e*32 +: 32] = A[(int'(a_raddr) * EPB + e) / N][(int'(a_raddr) * EPB + e) % N];
    for (int l = 0; l < LANES; l++)
      b_rdata[l*32 +: 32] = B[int'(b_raddr) / G][(int'(b_raddr) % G) * LANES + l];
  end
  always @(posedge clk) if (c_we) begin
    wr_count[c_waddr]++;
    for (int l = 0; l < LANES; l++)
      C[int'(c_waddr) / G][(int'(c_waddr) % G) * LANES + l] = c_wdata[l*32 +: 32];
  end

  task automatic run(bit wide);
    int t0, t1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = wide ? rand_norm(118, 16) : rand_unit();
        B[i][j] = wide ? rand_norm(118, 16) : rand_unit();
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        R[i][j] = 32'h0;
        for (int k = 0; k < N; k++) R[i][j] = ref_add(R[i][j], ref_mul(A[i][k], B[k][j]));
      end
    foreach (wr_count[w]) wr_count[w] = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    t0 = cycle;
    start <= 0;
    while (!done) @(posedge clk);
    t1 = cycle;
    checks++;
    if (t1 - t0 != N * N * N / LANES + 4) begin
      failures++;
      $display("done after %0d cycles, expected %0d", t1 - t0, N * N * N / LANES + 4);
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (C[i][j] !== R[i][j]) begin
          failures++;
          if (failures < 10) $display("C[%0d][%0d] = %h expected %h", i, j, C[i][j], R[i][j]);
        end
      end
    foreach (wr_count[w]) begin
      checks++;
      if (wr_count[w] != 1) begin failures++; $display("C word %0d written %0d times", w, wr_count[w]); end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
