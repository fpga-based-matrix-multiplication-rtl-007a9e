// Self-checking test of proc_sys_reset (HOLD = 16): outputs must be in reset
// while any source requests it, follow an asynchronous assertion without a
// clock edge, and leave reset together exactly HOLD + 3 rising edges after
// the request is withdrawn (two synchroniser stages, HOLD counting cycles,
// one output register). Each of the four sources is tried, and a request
// shorter than the hold time restarts the count.
module tb_proc_sys_reset;
  logic clk = 0;
  logic ext_reset_in = 0, aux_reset_in = 1, mb_debug_sys_rst = 0, dcm_locked = 1;
  logic mb_reset, bus_struct_reset, peripheral_reset, interconnect_aresetn, peripheral_aresetn;
  int checks = 0, failures = 0;
  bit clk_en = 1;

  proc_sys_reset #(.HOLD(16)) dut (
    .slowest_sync_clk(clk), .ext_reset_in(ext_reset_in), .aux_reset_in(aux_reset_in),
    .mb_debug_sys_rst(mb_debug_sys_rst), .dcm_locked(dcm_locked),
    .mb_reset(mb_reset), .bus_struct_reset(bus_struct_reset),
    .peripheral_reset(peripheral_reset), .interconnect_aresetn(interconnect_aresetn),
    .peripheral_aresetn(peripheral_aresetn)
  );

  always #5 if (clk_en) clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_reset();
    return mb_reset && bus_struct_reset && peripheral_reset && !interconnect_aresetn
           && !peripheral_aresetn;
  endfunction
  function automatic bit out_of_reset();
    return !mb_reset && !bus_struct_reset && !peripheral_reset && interconnect_aresetn
           && peripheral_aresetn;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("%s failed at %0t", what, $time); end
  endtask

  // release all sources, count edges until the outputs leave reset
  task automatic measure_release(string what);
    int n = 0;
    @(negedge clk);
    ext_reset_in = 1; aux_reset_in = 1; mb_debug_sys_rst = 0; dcm_locked = 1;
    while (!out_of_reset() && n < 100) begin
      @(posedge clk); n++;
      #1 check({what, ": outputs move together"}, in_reset() || out_of_reset());
    end
    check({what, ": release after HOLD+3 edges"}, n == 19);
    if (n != 19) $display("  released after %0d edges", n);
  endtask

  initial begin
    @(posedge clk);
    #1 check("reset after the first clock edge", in_reset());
    repeat (5) @(posedge clk);
    #1 check("held while ext_reset_in low", in_reset());
    measure_release("ext_reset_in");
    repeat (5) @(posedge clk);
    #1 check("stays out of reset", out_of_reset());
    // asynchronous assertion with the clock stopped
    @(negedge clk); clk_en = 0;
    #2 aux_reset_in = 0;
    #1 check("aux_reset_in asserts without a clock", in_reset());
    #5 clk_en = 1;
    measure_release("aux_reset_in");
    @(negedge clk); mb_debug_sys_rst = 1;
    #1 check("mb_debug_sys_rst asserts", in_reset());
    measure_release("mb_debug_sys_rst");
    @(negedge clk); dcm_locked = 0;
    #1 check("dcm_locked low asserts", in_reset());
    measure_release("dcm_locked");
    // short glitch during the hold restarts the count
    @(negedge clk); ext_reset_in = 0;
    @(negedge clk); ext_reset_in = 1;
    repeat (10) @(posedge clk);
    @(negedge clk); ext_reset_in = 0;
    #1 check("second request during hold", in_reset());
    measure_release("restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
