// Self-checking test of sdp_ram with a word of four segments: random writes
// with random segment masks, compared on every read with a model array;
// a read in the same cycle as a write to that word must show the old word,
// and the new one from the next cycle.
module tb_sdp_ram;
  localparam int WORDS = 64, SEG_W = 16, SEGS = 4, W = SEG_W * SEGS;

  logic clk = 0;
  logic we = 0;
  logic [SEGS-1:0] wmask = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [WORDS];
  int checks = 0, failures = 0;

  sdp_ram #(.WORDS(WORDS), .SEG_W(SEG_W), .SEGS(SEGS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_write(logic [5:0] ad, logic [SEGS-1:0] mk, logic [W-1:0] d);
    for (int s = 0; s < SEGS; s++)
      if (mk[s]) model[ad][s*SEG_W +: SEG_W] = d[s*SEG_W +: SEG_W];
  endtask

  initial begin
    // fill every word once
    for (int i = 0; i < WORDS; i++) begin
      we <= 1; wmask <= '1; waddr <= 6'(i); wdata <= {$urandom, $urandom};
      @(posedge clk); #1;
      model_write(6'(i), '1, wdata);
    end
    we <= 0;
    for (int i = 0; i < 3000; i++) begin
      logic [5:0] wa, ra;
      logic [SEGS-1:0] mk;
      logic [W-1:0] d;
      wa = 6'($urandom); ra = ($urandom % 4 == 0) ? wa : 6'($urandom);
      mk = 4'($urandom); d = {$urandom, $urandom};
      we <= ($urandom % 2 == 0); wmask <= mk; waddr <= wa; wdata <= d; raddr <= ra;
      #1;
      checks++;
      if (rdata !== model[ra]) begin
        failures++;
        if (failures < 10) $display("read %0d: %h expected %h", ra, rdata, model[ra]);
      end
      @(posedge clk); #1;
      if (we) model_write(wa, mk, d);
      checks++;
      if (rdata !== model[ra]) begin
        failures++;
        if (failures < 10) $display("read after write %0d: %h expected %h", ra, rdata, model[ra]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
