// Simple dual-port buffer: one write port with per-segment enables, one
// asynchronous read port.
//
// Holds the accelerator's local copies of A, B and C. A word is SEGS segments
// of SEG_W bits; a write updates the segments whose wmask bit is set, so a
// 512-bit stream beat can fill part of a wider word. rdata shows the word at
// raddr in the same cycle; a write lands at the clock edge.
// The buffers and their banking by 16 elements follow the accelerator's
// partitioned arrays; the word shapes and the read timing are this design's
// own. No reset: contents are defined only after they are written.
module sdp_ram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned SEG_W = 512,
  parameter int unsigned SEGS  = 1,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned W    = SEG_W * SEGS
) (
  input  logic            clk,
  input  logic            we,
  input  logic [SEGS-1:0] wmask,
  input  logic [AW-1:0]   waddr,
  input  logic [W-1:0]    wdata,
  input  logic [AW-1:0]   raddr,
  output logic [W-1:0]    rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int s = 0; s < int'(SEGS); s++)
        if (wmask[s]) mem[waddr][s*SEG_W +: SEG_W] <= wdata[s*SEG_W +: SEG_W];
    end
  end

  assign rdata = mem[raddr];

endmodule
