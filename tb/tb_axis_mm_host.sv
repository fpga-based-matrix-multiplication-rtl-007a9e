// Stream side of the host for the testbenches, standing in for the DMA.
// send() streams A then B (row-major, DWIDTH/32 floats per beat, element j
// in bits 32j+31:32j) with TLAST on the last beat of each matrix, idling
// before a beat with probability src_stall_pct %. A receiver runs all the
// time: it holds TREADY low with probability snk_stall_pct % per cycle,
// stores each accepted beat of C in order, and counts protocol errors (TLAST
// anywhere but on the last beat of a matrix, TKEEP not all ones).
// Handshakes are sampled at the falling edge; outputs change at rising edges.
module tb_axis_mm_host #(
  parameter int N      = 32,
  parameter int DWIDTH = 512
) (
  input  logic                clk,
  output logic [DWIDTH-1:0]   src_tdata,
  output logic [DWIDTH/8-1:0] src_tkeep,
  output logic                src_tlast,
  output logic                src_tvalid,
  input  logic                src_tready,
  input  logic [DWIDTH-1:0]   snk_tdata,
  input  logic [DWIDTH/8-1:0] snk_tkeep,
  input  logic                snk_tlast,
  input  logic                snk_tvalid,
  output logic                snk_tready
);

  localparam int EPB   = DWIDTH / 32;
  localparam int BEATS = N * N / EPB;

  logic [31:0] A [N][N], B [N][N], C [N][N];
  int src_stall_pct = 0, snk_stall_pct = 0;
  int rx_beats = 0, rx_matrices = 0, proto_errors = 0;
  int src_stalls = 0, snk_stalls = 0;      // cycles a side held back
  int last_rx_cycle = 0, first_rx_cycle = 0, last_tx_cycle = 0, cycle = 0;
  bit rx_enable = 1;

  initial begin
    src_tdata = '0; src_tkeep = '0; src_tlast = 0; src_tvalid = 0; snk_tready = 0;
  end

  always @(posedge clk) cycle <= cycle + 1;

  task automatic send_beat(logic [DWIDTH-1:0] d, bit last);
    bit taken = 0;
    while ($urandom % 100 < src_stall_pct) begin
      src_tvalid <= 0; src_stalls++;
      @(posedge clk);
    end
    src_tdata <= d; src_tkeep <= '1; src_tlast <= last; src_tvalid <= 1;
    while (!taken) begin
      @(negedge clk);
      taken = src_tready;
      @(posedge clk);
    end
    last_tx_cycle = cycle;
  endtask

  task automatic send();
    logic [DWIDTH-1:0] d;
    int e;
    @(posedge clk);
    for (int mtx = 0; mtx < 2; mtx++)
      for (int b = 0; b < BEATS; b++) begin
        for (int j = 0; j < EPB; j++) begin
          e = b * EPB + j;
          d[j*32 +: 32] = (mtx == 0) ? A[e / N][e % N] : B[e / N][e % N];
        end
        send_beat(d, b == BEATS - 1);
      end
    src_tvalid <= 0; src_tlast <= 0;
  endtask

  // receiver
  int e_rx;
  always @(posedge clk) begin
    if (rx_enable && ($urandom % 100 >= snk_stall_pct)) snk_tready <= 1;
    else snk_tready <= 0;
  end

  always @(negedge clk) begin
    if (snk_tvalid && !snk_tready) snk_stalls++;
    if (snk_tvalid && snk_tready) begin
      if (rx_beats == 0) first_rx_cycle = cycle;
      for (int j = 0; j < EPB; j++) begin
        e_rx = rx_beats * EPB + j;
        C[e_rx / N][e_rx % N] = snk_tdata[j*32 +: 32];
      end
      if (snk_tkeep != '1) proto_errors++;
      if (snk_tlast != (rx_beats == BEATS - 1)) proto_errors++;
      if (rx_beats == BEATS - 1) begin
        rx_beats = 0; rx_matrices++; last_rx_cycle = cycle;
      end else begin
        rx_beats++;
      end
    end
  end

endmodule
