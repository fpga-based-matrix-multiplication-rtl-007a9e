// Self-checking test of mac_lane: sums of random lengths (1 to 40 terms)
// are fed back to back, one term per cycle, with occasional idle gaps; each
// finished sum must appear exactly two cycles after its last term and equal
// the sequential reference "acc = 0; acc = acc + a*b" rounded at every step.
module tb_mac_lane;
  import tb_fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [31:0] a = 0, b = 0;
  logic out_valid;
  logic [31:0] acc;
  int checks = 0, failures = 0, cycle = 0;

  logic [31:0] exp_q[$];
  int          due_q[$];

  mac_lane dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: out_valid must come exactly when due, with the expected sum
  always @(posedge clk) begin
    if (rst_n) begin
      if (due_q.size() != 0 && due_q[0] == cycle) begin
        checks++;
        if (!out_valid || acc !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: out_valid=%b acc=%h expected %h", cycle, out_valid, acc, exp_q[0]);
        end
        void'(due_q.pop_front());
        void'(exp_q.pop_front());
      end else if (out_valid) begin
        checks++; failures++;
        $display("cycle %0d: unexpected out_valid", cycle);
      end
    end
  end

  initial begin
    int len;
    logic [31:0] s, ta, tb_;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      len = 1 + int'($urandom % 40);
      s = 32'h0;
      for (int k = 0; k < len; k++) begin
        ta  = (t % 3 == 0) ? rand_norm(120, 14) : rand_unit();
        tb_ = (t % 3 == 0) ? rand_norm(120, 14) : rand_unit();
        s = ref_add(s, ref_mul(ta, tb_));
        in_valid <= 1; in_first <= (k == 0); in_last <= (k == len - 1);
        a <= ta; b <= tb_;
        @(posedge clk);
        if (k == len - 1) begin
          exp_q.push_back(s);
          due_q.push_back(cycle + 2);  // visible two edges after the term is taken
        end
      end
      if ($urandom % 4 == 0) begin
        in_valid <= 0; in_first <= 0; in_last <= 0;
        repeat (1 + $urandom % 3) @(posedge clk);
      end
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    repeat (5) @(posedge clk);
    if (due_q.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
