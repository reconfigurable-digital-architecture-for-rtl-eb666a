// tb_adapto_dist1: the inner step of the MPEG-2 encoder's dist1 routine
// (sum of absolute differences against the horizontal half-pel average)
// on the ADAPTO unit.
//
// In software a step is  v = ((p1[t] + p1[t+1] + 1) >> 1) - p2[t];
// s += |v|.  Here the processor forms k = p1[t] + p1[t+1] and passes
// d1 = k and d2 = p2[t] << 16 (two operands, d3 unused). One ADAPTO
// operation in context 0 returns v as a 32-bit signed value; the absolute
// value and the accumulation stay in software. The testbench runs rows of
// random pixels plus the extreme cases (255 + 255 against 0, 0 + 0 against
// 255), checks every v and every row sum against a direct model of the
// software loop, and checks that each step takes one clock cycle.
module tb_adapto_dist1;
  import adapto_pkg::*;
  import adapto_tb_pkg::*;

  logic clk = 0, rst_n = 0, cfg_start = 0, cfg_busy;
  logic [31:0] cfg_data = '0;
  logic [3:0]  ctx = '0;
  logic [31:0] d1 = '0, d2 = '0, d3 = '0, dout;

  adapto dut (
    .clk(clk), .rst_n(rst_n), .cfg_start(cfg_start), .cfg_data(cfg_data),
    .cfg_busy(cfg_busy), .ctx(ctx), .d1(d1), .d2(d2), .d3(d3), .dout(dout));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cycles = 0;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) n_cycles++;

  localparam int LEN = 17;            // pixels per row: 16 steps

  adapto_tb_pkg::adapto_image img = new();

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] p1 [LEN];
    logic [7:0] p2 [LEN];
    int s_ref, s_hw, v_ref, cyc0, nwords;
    logic [31:0] v;

    img.cfg_dist1(0);
    nwords = img.serialise();
    check("load words", 32'(nwords), 32'(NWORDS));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    for (int n = 0; n < NWORDS; n++) begin
      cfg_data = img.words[n];
      @(negedge clk);
    end
    check("load finished", 32'(cfg_busy), 32'd0);

    for (int row = 0; row < 60; row++) begin
      for (int i = 0; i < LEN; i++) begin
        p1[i] = 8'($urandom);
        p2[i] = 8'($urandom);
        if (row == 0) begin p1[i] = 8'hFF; p2[i] = 8'h00; end
        if (row == 1) begin p1[i] = 8'h00; p2[i] = 8'hFF; end
        if (row == 2) begin p1[i] = 8'(i); p2[i] = 8'(i); end
      end
      s_ref = 0; s_hw = 0;
      @(posedge clk); #1;
      cyc0 = n_cycles;
      for (int t = 0; t < LEN - 1; t++) begin
        v_ref = ((int'(p1[t]) + int'(p1[t+1]) + 1) >>> 1) - int'(p2[t]);
        s_ref += (v_ref >= 0) ? v_ref : -v_ref;
        @(negedge clk);
        ctx = 4'd0;
        d1 = 32'(int'(p1[t]) + int'(p1[t+1]));
        d2 = {8'h00, p2[t], 16'h0000};
        d3 = $urandom;                      // not used by the mapping
        #4 v = dout;
        check("dist1 step", v, 32'(v_ref));
        s_hw += ($signed(v) >= 0) ? int'($signed(v)) : -int'($signed(v));
      end
      @(posedge clk); #1;
      check("dist1 cycles per row", 32'(n_cycles - cyc0), 32'(LEN - 1));
      check("dist1 row sum", 32'(s_hw), 32'(s_ref));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
