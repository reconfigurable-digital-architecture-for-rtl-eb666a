// tb_adapto_ctx_mem: checks the line-written multicontext memory.
//
// Lines are written one at a time with random 16-bit values (bit c of the
// write data belongs to context c) and then every context is read back and
// compared with a reference array kept by the testbench. A cycle with no
// enable must leave the contents alone, and a line write must touch only
// its own line. Reads are combinational: the word of a new context must be
// visible without a clock edge.
module tb_adapto_ctx_mem;
  localparam int N = 7;
  localparam int NCTX = 16;

  logic clk = 0;
  logic [N-1:0] line_we;
  logic [NCTX-1:0] wdata;
  logic [3:0] ctx;
  logic [N-1:0] rdata;
  logic [NCTX-1:0] ref_line [N];
  int checks = 0, failures = 0;

  adapto_ctx_mem #(.N(N), .NCTX(NCTX)) dut (
    .clk(clk), .line_we(line_we), .wdata(wdata), .ctx(ctx), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int c = 0; c < NCTX; c++) begin
      logic [N-1:0] exp;
      ctx = 4'(c);
      #1;
      for (int b = 0; b < N; b++) exp[b] = ref_line[b][c];
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL ctx %0d: got %b exp %b", c, rdata, exp);
      end
    end
  endtask

  initial begin
    line_we = '0; wdata = '0; ctx = '0;
    for (int round = 0; round < 4; round++) begin
      for (int b = 0; b < N; b++) begin
        @(negedge clk);
        line_we = '0; line_we[b] = 1'b1;
        wdata = 16'($urandom);
        ref_line[b] = wdata;
        @(negedge clk);
        line_we = '0;
        wdata = 16'($urandom);   // must not be written
      end
      repeat (2) @(negedge clk);
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
