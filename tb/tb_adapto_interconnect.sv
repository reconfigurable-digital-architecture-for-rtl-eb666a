// tb_adapto_interconnect: checks the first (largest) interconnect stripe:
// 66 wires, 96 outputs, 7-bit codes, 16 contexts.
//
// Random codes (including codes beyond the last wire, which must give 0)
// are loaded for every output and context through the line enables, couple
// by couple. Then, for random wire values, every context is selected and
// each output is compared with the wire its code names.
module tb_adapto_interconnect;
  localparam int NIN = 66, NOUT = 96, SELW = 7, NCTX = 16;

  logic clk = 0;
  logic [NIN-1:0] wires;
  logic [3:0] ctx;
  logic [(NOUT/2)*SELW-1:0] line_we;
  logic [2*NCTX-1:0] cfg_data;
  logic [NOUT-1:0] sel_out;
  logic [SELW-1:0] codes [NOUT][NCTX];
  int checks = 0, failures = 0;
  int high_codes = 0;

  adapto_interconnect #(.NIN(NIN), .NOUT(NOUT), .SELW(SELW), .NCTX(NCTX)) dut (
    .clk(clk), .wires(wires), .ctx(ctx), .line_we(line_we),
    .cfg_data(cfg_data), .sel_out(sel_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_we = '0; cfg_data = '0; ctx = '0; wires = '0;
    for (int j = 0; j < NOUT; j++)
      for (int c = 0; c < NCTX; c++) begin
        codes[j][c] = SELW'($urandom_range(0, 2**SELW - 1));
        if (int'(codes[j][c]) >= NIN) high_codes++;
      end
    for (int k = 0; k < NOUT / 2; k++)
      for (int b = 0; b < SELW; b++) begin
        @(negedge clk);
        line_we = '0;
        line_we[SELW*k+b] = 1'b1;
        for (int c = 0; c < NCTX; c++) begin
          cfg_data[c]        = codes[2*k][c][b];
          cfg_data[NCTX + c] = codes[2*k+1][c][b];
        end
      end
    @(negedge clk);
    line_we = '0;
    if (high_codes == 0) begin failures++; $display("FAIL no out-of-range code drawn"); end
    for (int t = 0; t < 20; t++) begin
      wires = NIN'({$urandom, $urandom, $urandom});
      for (int c = 0; c < NCTX; c++) begin
        int bad;
        ctx = 4'(c);
        #1;
        bad = 0;
        for (int j = 0; j < NOUT; j++) begin
          logic exp;
          exp = (int'(codes[j][c]) < NIN) ? wires[codes[j][c]] : 1'b0;
          if (sel_out[j] !== exp) bad++;
        end
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL ctx %0d: %0d outputs wrong", c, bad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
