// Processor system reset: turns the processor's asynchronous reset into
// resets synchronised to the fabric clock.
//
// Any reset source holds every output in reset at once: ext_reset_in and
// aux_reset_in low, mb_debug_sys_rst high, or dcm_locked low. The combined
// request is synchronised by a two-stage synchroniser; once it has been
// inactive for HOLD consecutive clock cycles all outputs leave reset together,
// on a clock edge. Assertion is asynchronous, release is synchronous.
// Outputs: active-high mb_reset, bus_struct_reset and peripheral_reset;
// active-low interconnect_aresetn and peripheral_aresetn.
// The port names are those of the reset block in the published block design,
// fed by FCLK_RESET0_N and clocked by the 50 MHz fabric clock; the source
// polarities, the hold count and releasing all outputs at once are this
// design's choices (the vendor block releases them in sequence).
module proc_sys_reset #(
  parameter int unsigned HOLD = 16
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in,
  input  logic aux_reset_in,
  input  logic mb_debug_sys_rst,
  input  logic dcm_locked,
  output logic mb_reset,
  output logic bus_struct_reset,
  output logic peripheral_reset,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);

  localparam int unsigned CW = $clog2(HOLD + 1);

  logic          req_n;       // low while any source asks for reset
  logic [1:0]    sync_q;
  logic [CW-1:0] cnt_q;
  logic          rst_q;

  assign req_n = ext_reset_in && aux_reset_in && !mb_debug_sys_rst && dcm_locked;

  always_ff @(posedge slowest_sync_clk or negedge req_n) begin
    if (!req_n) begin
      sync_q <= 2'b00;
      cnt_q  <= '0;
      rst_q  <= 1'b1;
    end else begin
      sync_q <= {sync_q[0], 1'b1};
      if (!sync_q[1]) begin
        cnt_q <= '0;
      end else if (cnt_q != CW'(HOLD)) begin
        cnt_q <= cnt_q + 1'b1;
      end
      rst_q <= !(sync_q[1] && cnt_q == CW'(HOLD));
    end
  end

  assign mb_reset             = rst_q;
  assign bus_struct_reset     = rst_q;
  assign peripheral_reset     = rst_q;
  assign interconnect_aresetn = !rst_q;
  assign peripheral_aresetn   = !rst_q;

endmodule
