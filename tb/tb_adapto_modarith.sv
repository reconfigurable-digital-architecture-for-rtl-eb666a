// tb_adapto_modarith: modular-arithmetic workloads on the ADAPTO unit at the
// largest operand sizes the 32-column array holds.
//
// An n-bit modulus needs n + 2 columns for both mappings, so n = 30 is the
// widest that fits. The testbench loads one configuration image with:
//   ctx 0  Montgomery step, 30-bit modulus MA
//   ctx 1  Montgomery step, 24-bit modulus MB
//   ctx 2  modular addition, one 30-bit modulus MC on columns 0..31
//   ctx 3  modular addition, four 6-bit moduli, one per byte
// A Montgomery product A*B*2^-n mod M runs as n operations, one per clock
// cycle: d1 = B, d2 = bit i of A on all 32 lines, d3 = the previous result
// (starting at 0); dout is the next result. The testbench counts the clock
// cycles per product (must be n), checks that the result is below 2M and
// that result * 2^n = A * B (mod M). Modular additions take one cycle each
// and are compared with (X + Y) mod M, including the boundary sums
// M - 1 + 0, M - 1 + 1 and (M - 1) + (M - 1).
module tb_adapto_modarith;
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

  localparam longint MA = 'h3A5C96E7;   // 30 bits, odd
  localparam longint MB = 'hC0FFEF;     // 24 bits, odd
  localparam longint MC = 'h2F0F1235;   // 30 bits
  int mods [4] = '{59, 41, 33, 45};

  adapto_tb_pkg::adapto_image img = new();

  // drive at the falling edge, sample before the next rising edge
  task automatic op(logic [3:0] c, logic [31:0] a1, logic [31:0] a2,
                    logic [31:0] a3, output logic [31:0] r);
    @(negedge clk);
    ctx = c; d1 = a1; d2 = a2; d3 = a3;
    #4 r = dout;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic mont(logic [3:0] c, longint unsigned m, int n,
                      longint unsigned a, longint unsigned b);
    logic [31:0] r = '0;
    int cyc0;
    longint unsigned lhs, rhs;
    @(posedge clk); #1;
    cyc0 = n_cycles;
    for (int i = 0; i < n; i++) op(c, 32'(b), {32{a[i]}}, r, r);
    @(posedge clk); #1;
    check("Montgomery cycles", 32'(n_cycles - cyc0), 32'(n));
    checks++;
    if (64'(r) >= 2 * m) begin
      failures++; $display("FAIL Montgomery result %h not below 2M", r);
    end
    lhs = (64'(r) << n) % m;
    rhs = (a * b) % m;
    check("Montgomery congruence", 32'(lhs), 32'(rhs));
  endtask

  task automatic modadd_wide(longint unsigned x, longint unsigned y);
    logic [31:0] r;
    op(4'd2, 32'(x), 32'(y), '0, r);
    check("30-bit modular addition", r, 32'((x + y) % MC));
  endtask

  function automatic longint unsigned below(longint unsigned m);
    return {$urandom, $urandom} % m;
  endfunction

  initial begin
    logic [31:0] r, x, y, e;
    int nwords;

    img.cfg_mont(0, MA, 30);
    img.cfg_mont(1, MB, 24);
    img.cfg_modadd_lane(2, 0, MC, 30);
    img.cfg_modadd(3, mods, 6);
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

    // Montgomery products, including operands at M - 1
    mont(4'd0, MA, 30, MA - 1, MA - 1);
    mont(4'd1, MB, 24, MB - 1, MB - 1);
    mont(4'd0, MA, 30, 1, 1);
    for (int t = 0; t < 40; t++) begin
      mont(4'd0, MA, 30, below(MA), below(MA));
      mont(4'd1, MB, 24, below(MB), below(MB));
    end

    // 30-bit modular addition
    modadd_wide(MC - 1, 0);
    modadd_wide(MC - 1, 1);
    modadd_wide(MC - 1, MC - 1);
    modadd_wide(0, 0);
    for (int t = 0; t < 300; t++) modadd_wide(below(MC), below(MC));

    // four 6-bit lanes
    for (int t = 0; t < 300; t++) begin
      for (int l = 0; l < 4; l++) begin
        x[8*l +: 8] = 8'($urandom % mods[l]);
        y[8*l +: 8] = 8'($urandom % mods[l]);
        if (t == 0) begin x[8*l +: 8] = 8'(mods[l] - 1); y[8*l +: 8] = 8'(mods[l] - 1); end
        e[8*l +: 8] = 8'((x[8*l +: 8] + y[8*l +: 8]) % mods[l]);
      end
      op(4'd3, x, y, '0, r);
      check("6-bit lane modular addition", r, e);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
