// Shared types and constants of the matrix multiplication accelerator.
//
// Matrix elements are IEEE-754 single-precision numbers carried as raw
// 32-bit words. The defaults follow the accelerator as published: 128x128
// matrices streamed over a 512-bit AXI4-Stream. The register offsets of the
// AXI4-Lite control port follow the common HLS block-level control layout;
// only CTRL at 0x00 with ap_start in bit 0 and auto_restart in bit 7 comes
// from the published host code, the rest is this design's choice.
package mm_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned FP_W         = 32;
  localparam int unsigned DEF_N        = 128;   // matrix dimension
  localparam int unsigned DEF_DWIDTH   = 512;   // stream data width
  localparam int unsigned DEF_LANES    = 32;    // parallel MAC lanes

  localparam fp32_t FP_QNAN     = 32'h7FC0_0000;
  localparam fp32_t FP_POS_ZERO = 32'h0000_0000;

  // AXI4-Lite register offsets of the IP's control port
  localparam logic [5:0] REG_CTRL = 6'h00;
  localparam logic [5:0] REG_GIE  = 6'h04;
  localparam logic [5:0] REG_IER  = 6'h08;
  localparam logic [5:0] REG_ISR  = 6'h0C;

  // CTRL register bit positions
  localparam int unsigned CTRL_AP_START     = 0;
  localparam int unsigned CTRL_AP_DONE      = 1;
  localparam int unsigned CTRL_AP_IDLE      = 2;
  localparam int unsigned CTRL_AP_READY     = 3;
  localparam int unsigned CTRL_AUTO_RESTART = 7;

  // AXI response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Phases of one run of the IP, in the order of the published function
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_LOAD_A  = 3'd1,
    ST_LOAD_B  = 3'd2,
    ST_COMPUTE = 3'd3,
    ST_WRITE_C = 3'd4,
    ST_DONE    = 3'd5
  } mm_state_e;

endpackage
