// tb_adapto_cfg_chain: checks the write-token flip-flop chain at its full
// length of 912.
//
// After a one-cycle start pulse, line_en must hold a single 1 at position n
// exactly n cycles after the token entered, busy must stay high for exactly
// LEN cycles (one configuration word per cycle), a second start while busy
// must be ignored, and reset must empty the chain.
module tb_adapto_cfg_chain;
  localparam int LEN = 912;

  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [LEN-1:0] line_en;
  int checks = 0, failures = 0;

  adapto_cfg_chain #(.LEN(LEN)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .line_en(line_en), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int busy_cycles, pos_errors;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(line_en == '0 && !busy, "chain empty after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0; pos_errors = 0;
    for (int n = 0; n < LEN; n++) begin
      logic [LEN-1:0] exp;
      exp = '0; exp[n] = 1'b1;
      if (line_en !== exp || !busy) pos_errors++;
      if (busy) busy_cycles++;
      if (n == 100) start = 1;     // ignored while busy
      @(negedge clk);
      start = 0;
    end
    chk(pos_errors == 0, "token position follows the cycle count");
    chk(busy_cycles == LEN, "busy for exactly LEN cycles");
    chk(!busy && line_en == '0, "chain empty after LEN cycles");
    // restart, then reset in the middle
    start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    chk(line_en[10] && busy, "second load token at position 10");
    rst_n = 0; #1;
    chk(line_en == '0 && !busy, "reset empties the chain");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
