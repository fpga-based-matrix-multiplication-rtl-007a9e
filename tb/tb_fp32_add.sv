// Self-checking test of fp32_add: directed cases (signed zeros, exact
// cancellation, infinities, NaN, rounding ties, carry out), then random
// operands with close and distant exponents, mixed signs, overflow and
// underflow, and raw random bit patterns, each compared bit for bit with the
// double-precision reference.
module tb_fp32_add;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] exp_y;
    a = ta; b = tb_;
    #1;
    exp_y = ref_add(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("ADD FAIL %h + %h = %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] r;
  initial begin
    check(32'h3F80_0000, 32'h3F80_0000);  // 1 + 1
    check(32'h3F80_0000, 32'hBF80_0000);  // 1 - 1 -> +0
    check(32'h8000_0000, 32'h8000_0000);  // -0 + -0 -> -0
    check(32'h0000_0000, 32'h8000_0000);  // 0 + -0 -> +0
    check(32'h0000_0000, 32'h4040_0000);  // 0 + 3
    check(32'hC040_0000, 32'h8000_0000);  // -3 + -0
    check(32'h7F80_0000, 32'hFF80_0000);  // inf - inf -> NaN
    check(32'h7F80_0000, 32'h3F80_0000);  // inf + 1
    check(32'h3F80_0000, 32'hFF80_0000);  // 1 - inf
    check(32'h3F80_0000, 32'h7FC0_0001);  // NaN
    check(32'h4B80_0000, 32'h3F80_0000);  // 2^24 + 1 : tie to even
    check(32'h4B80_0001, 32'h3F80_0000);  // tie to odd -> up
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);  // overflow
    check(32'h0080_0001, 32'h8080_0000);  // result below normal range
    check(32'h3F80_0000, 32'hB380_0000);  // 1 - 2^-24
    check(32'h3F80_0000, 32'h3380_0000);  // 1 + 2^-24 tie
    repeat (20000) check(rand_norm(100, 50), rand_norm(100, 50));
    repeat (20000) check(rand_norm(120, 4), rand_norm(120, 4));    // close exponents
    repeat (5000)  check(rand_norm(1, 254), rand_norm(1, 254));
    repeat (5000)  check(rand_norm(1, 6), rand_norm(1, 6));        // near underflow
    repeat (5000) begin                                            // near-cancellation
      r = rand_norm(120, 10);
      check(r, {~r[31], r[30:2], 2'($urandom)});
    end
    repeat (10000) check($urandom, $urandom);
    repeat (5000)  check(rand_unit(), rand_unit());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
