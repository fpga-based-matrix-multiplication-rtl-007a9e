// Floating-point multiply-accumulate lane: sum += a * b.
//
// Two pipeline stages. Stage 1 multiplies the operand pair and registers the
// product; stage 2 adds the product to the running sum. Products are added
// strictly in the order they enter, each rounded separately, so a lane gives
// the same bits as the sequential loop "sum = 0; for k: sum += a[k]*b[k]".
// in_first starts a new sum (the product is added to +0, as the loop does);
// in_last marks the final term, and out_valid pulses for one cycle when acc
// holds the finished sum, two cycles after that term was presented.
// A new sum may start in the cycle after the last term of the previous one,
// so the lane accepts one term per cycle without gaps.
// The operation is the accelerator's inner loop; the pipeline split is this
// design's own.
module mac_lane
  import mm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t acc
);

  fp32_t prod_c, prod_q, sum_c, addend;
  logic  p_valid, p_first, p_last;

  fp32_mul u_mul (.a(a), .b(b), .y(prod_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q  <= '0;
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
    end else begin
      prod_q  <= prod_c;
      p_valid <= in_valid;
      p_first <= in_first;
      p_last  <= in_last;
    end
  end

  assign addend = p_first ? FP_POS_ZERO : acc;

  fp32_add u_add (.a(addend), .b(prod_q), .y(sum_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= FP_POS_ZERO;
      out_valid <= 1'b0;
    end else begin
      if (p_valid) acc <= sum_c;
      out_valid <= p_valid & p_last;
    end
  end

endmodule
