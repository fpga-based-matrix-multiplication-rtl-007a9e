// Self-checking test of fp32_mul: directed special cases, then random
// operands over the whole exponent range (overflow and underflow included),
// close exponents, raw random bit patterns and products that are exact
// rounding ties, each compared bit for bit
// with the double-precision reference.
module tb_fp32_mul;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] exp_y;
    a = ta; b = tb_;
    #1;
    exp_y = ref_mul(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MUL FAIL %h * %h = %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h4000_0000);  // 1 * 2
    check(32'h3FC0_0000, 32'h3FC0_0000);  // 1.5 * 1.5
    check(32'hBF80_0000, 32'h3F80_0000);  // -1 * 1
    check(32'h0000_0000, 32'h4000_0000);  // 0 * 2
    check(32'h8000_0000, 32'h4000_0000);  // -0 * 2
    check(32'h0000_0001, 32'h4000_0000);  // subnormal * 2 -> 0
    check(32'h7F80_0000, 32'h0000_0000);  // inf * 0 -> NaN
    check(32'h7F80_0000, 32'hC000_0000);  // inf * -2
    check(32'h7FC0_1234, 32'h3F80_0000);  // NaN
    check(32'h7F00_0000, 32'h7F00_0000);  // overflow
    check(32'h0080_0000, 32'h3F00_0000);  // underflow to zero
    check(32'h3F7F_FFFF, 32'h3F80_0001);  // rounding near 1
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);  // carry out of rounding
    repeat (20000) check(rand_norm(1, 254), rand_norm(1, 254));
    repeat (20000) check(rand_norm(110, 30), rand_norm(110, 30));
    repeat (5000)  check(rand_norm(60, 10), rand_norm(60, 10));   // near underflow
    repeat (5000)  check(rand_norm(190, 10), rand_norm(190, 10)); // near overflow
    repeat (10000) check($urandom, $urandom);
    repeat (5000)  check(rand_unit(), rand_unit());
    // x * 1.5 and x * 1.25 give exact ties when x's low bits are odd
    repeat (5000)  check(rand_norm(110, 30), {1'($urandom), 8'(120 + $urandom % 14), 23'h40_0000});
    repeat (5000)  check(rand_norm(110, 30), {1'($urandom), 8'(120 + $urandom % 14), 23'h20_0000});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
