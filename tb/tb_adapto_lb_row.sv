// tb_adapto_lb_row: checks one full 32-LB stripe with its context memories
// and carry chain.
//
// Eight contexts are loaded through the line-enable interface, couple by
// couple, exactly as the configuration chain would load them (even LB from
// bus bits [15:0], odd LB from [31:16], lines S0, S1, S2, P). Then random
// operands are applied in every context and the stripe output compared with
// arithmetic computed here: a 32-bit ripple add, its carry vector, AND, OR,
// XOR, NOT, 3-input XOR and majority, and a per-bit mix of operations.
module tb_adapto_lb_row;
  import adapto_pkg::*;
  localparam int W = 32;
  localparam int NCTX = 16;

  logic clk = 0;
  logic [W-1:0] d1, d2, d3, y;
  logic [3:0] ctx;
  logic [(W/2)*4-1:0] line_we;
  logic [2*NCTX-1:0] cfg_data;
  lb_cfg_t cfgs [W][NCTX];
  int checks = 0, failures = 0;

  adapto_lb_row #(.W(W), .NCTX(NCTX)) dut (
    .clk(clk), .d1(d1), .d2(d2), .d3(d3), .ctx(ctx),
    .line_we(line_we), .cfg_data(cfg_data), .y(y));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    for (int k = 0; k < W / 2; k++)
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        line_we = '0;
        line_we[4*k+b] = 1'b1;
        for (int c = 0; c < NCTX; c++) begin
          cfg_data[c]        = cfgs[2*k][c][b];
          cfg_data[NCTX + c] = cfgs[2*k+1][c][b];
        end
      end
    @(negedge clk);
    line_we = '0;
  endtask

  function automatic logic [W-1:0] carries(logic [W-1:0] a, logic [W-1:0] b);
    // carry out of each bit position of a + b
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[W:1] ^ {1'b0, a[W-1:1] ^ b[W-1:1]};
  endfunction

  initial begin
    lb_cfg_t mix [W];
    line_we = '0; cfg_data = '0; ctx = '0; d1 = '0; d2 = '0; d3 = '0;
    for (int i = 0; i < W; i++) begin
      cfgs[i][0] = LB_SUM;   cfgs[i][1] = LB_CARRY; cfgs[i][2] = LB_AND2;
      cfgs[i][3] = LB_OR2;   cfgs[i][4] = LB_XOR2;  cfgs[i][5] = LB_NOT;
      cfgs[i][6] = LB_XOR3;  cfgs[i][7] = LB_MAJ3;
      mix[i] = (i % 3 == 0) ? LB_XNOR2 : (i % 3 == 1) ? LB_PASS : LB_AND2;
      cfgs[i][8] = mix[i];
      for (int c = 9; c < NCTX; c++) cfgs[i][c] = lb_cfg_t'(4'($urandom));
    end
    load();
    for (int t = 0; t < 40; t++) begin
      logic [W-1:0] exp;
      d1 = $urandom; d2 = $urandom; d3 = $urandom;
      if (t == 0) begin d1 = '1; d2 = 32'd1; end   // carry through all 32 bits
      for (int c = 0; c <= 8; c++) begin
        ctx = 4'(c);
        #1;
        case (c)
          0: exp = d1 + d2;
          1: exp = carries(d1, d2);
          2: exp = d1 & d2;
          3: exp = d1 | d2;
          4: exp = d1 ^ d2;
          5: exp = ~d1;
          6: exp = d1 ^ d2 ^ d3;
          7: exp = (d1 & d2) | (d1 & d3) | (d2 & d3);
          default: for (int i = 0; i < W; i++)
            exp[i] = (i % 3 == 0) ? ~(d1[i] ^ d2[i]) : (i % 3 == 1) ? d1[i] : (d1[i] & d2[i]);
        endcase
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL ctx %0d d1=%h d2=%h d3=%h: y=%h exp %h", c, d1, d2, d3, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
