// tb_adapto_nios: end-to-end test of the complete unit behind its
// two-operand custom-instruction port (adapto_nios) at the default size
// (32 bits, 16 contexts).
//
// The testbench builds a configuration image (class adapto_image of
// adapto_tb_pkg), loads it through the configuration port (912 words) and
// then works only through custom instructions, one per clock cycle:
//   ctx 0  datab + dataa                       (two operands)
//   ctx 1  datab ^ dataa ^ D3                  (three operands)
//   ctx 2  ~((datab & dataa) | D3)             (three operands)
//   ctx 3  Montgomery step, 16-bit modulus: datab = B, dataa = a_i on all
//          lines, D3 = running result
// A three-operand function first needs a load instruction (n[7] = 1) that
// puts datab into the state register. A Montgomery product therefore takes
// two instructions per bit of A; the testbench counts 32 instructions and
// 32 cycles per 16-bit product. It also checks that a load returns the old
// register value, that a load with start or clk_en low leaves the register
// alone, that the register keeps its value across executes, and that reset
// clears it. Mechanisms are counted, and each must occur at least once:
// configuration loads, state-register loads, suppressed loads,
// two-operand and three-operand executes, and context switches.
module tb_adapto_nios;
  import adapto_pkg::*;
  import adapto_tb_pkg::*;

  logic        clk = 0, rst_n = 0, cfg_start = 0, cfg_busy;
  logic [31:0] cfg_data = '0;
  logic        clk_en = 0, start = 0;
  logic [7:0]  n = '0;
  logic [31:0] dataa = '0, datab = '0, result;

  adapto_nios dut (
    .clk(clk), .rst_n(rst_n), .cfg_start(cfg_start), .cfg_data(cfg_data),
    .cfg_busy(cfg_busy), .clk_en(clk_en), .start(start), .n(n),
    .dataa(dataa), .datab(datab), .result(result));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cycles = 0, n_instr = 0;
  int n_cfg_load = 0, n_d3_load = 0, n_load_gated = 0;
  int n_two_op = 0, n_three_op = 0, n_ctx_switch = 0;
  logic [3:0]  last_ctx = '0;
  logic [31:0] d3_model = '0;

  localparam int MN = 16;
  localparam longint MONT_M = 'hF1E3;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) n_cycles++;

  adapto_tb_pkg::adapto_image img = new();

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // one custom instruction: inputs at the falling edge, result sampled
  // before the rising edge that ends the instruction
  task automatic ci(logic [7:0] op, logic [31:0] a, logic [31:0] b,
                    output logic [31:0] r, input logic st = 1'b1,
                    input logic en = 1'b1);
    @(negedge clk);
    n = op; dataa = a; datab = b; start = st; clk_en = en;
    n_instr++;
    if (!op[7]) begin
      if (op[3:0] != last_ctx) n_ctx_switch++;
      last_ctx = op[3:0];
    end
    #4 r = result;
    @(posedge clk); #1;
    start = 1'b0;
  endtask

  task automatic load_d3(logic [31:0] v);
    logic [31:0] r;
    ci(8'h80, $urandom, v, r);
    check("load returns old D3", r, d3_model);
    d3_model = v;
    n_d3_load++;
  endtask

  initial begin
    logic [31:0] a, b, c, r, res;
    logic [15:0] ma, mb;
    int cyc0, ins0, nwords;
    longint unsigned lhs, rhs;

    img.cfg_add(0);
    img.cfg_xor3(1);
    img.cfg_logic(2);
    img.cfg_mont(3, MONT_M, MN);
    nwords = img.serialise();
    check("load words", 32'(nwords), 32'(NWORDS));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    for (int k = 0; k < NWORDS; k++) begin
      cfg_data = img.words[k];
      @(negedge clk);
    end
    check("configuration loaded", 32'(cfg_busy), 32'd0);
    n_cfg_load++;

    // after reset the state register is 0
    ci(8'h01, 32'h1234_5678, 32'h0F0F_0F0F, r);
    check("xor3 with D3 = 0 after reset", r, 32'h1234_5678 ^ 32'h0F0F_0F0F);
    n_three_op++;

    for (int t = 0; t < 200; t++) begin
      a = $urandom; b = $urandom; c = $urandom;
      ci(8'h00, a, b, r);
      check("add", r, a + b);
      n_two_op++;
      if (t % 4 == 0) load_d3(c);
      ci(8'h01, a, b, r);
      check("xor3", r, a ^ b ^ d3_model);
      ci(8'h02, a, b, r);
      check("~((b & a) | D3)", r, ~((b & a) | d3_model));
      n_three_op += 2;
      // loads that must not happen
      if (t % 8 == 1) begin
        ci(8'h80, a, ~d3_model, r, 1'b0, 1'b1);
        ci(8'h80, a, ~d3_model, r, 1'b1, 1'b0);
        n_load_gated += 2;
        ci(8'h01, 32'h0, 32'h0, r);
        check("suppressed load left D3", r, d3_model);
      end
    end

    // Montgomery products: per bit of A, load R into D3, then execute
    for (int t = 0; t < 20; t++) begin
      ma = 16'($urandom % MONT_M);
      mb = 16'($urandom % MONT_M);
      res = '0;
      @(posedge clk); #1;
      cyc0 = n_cycles; ins0 = n_instr;
      for (int i = 0; i < MN; i++) begin
        load_d3(res);
        ci(8'h03, {32{ma[i]}}, 32'(mb), res);
        n_three_op++;
      end
      check("Montgomery instructions", 32'(n_instr - ins0), 32'(2 * MN));
      check("Montgomery cycles", 32'(n_cycles - cyc0), 32'(2 * MN));
      checks++;
      if (64'(res) >= 2 * MONT_M) begin
        failures++; $display("FAIL Montgomery result %h not below 2M", res);
      end
      lhs = (64'(res) << MN) % MONT_M;
      rhs = (64'(ma) * 64'(mb)) % MONT_M;
      check("Montgomery congruence", 32'(lhs), 32'(rhs));
    end

    // reset clears the state register and leaves the configuration alone
    load_d3(32'hDEAD_BEEF);
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    d3_model = '0;
    ci(8'h01, 32'h5555_0000, 32'h0000_AAAA, r);
    check("D3 cleared by reset", r, 32'h5555_AAAA);
    ci(8'h00, 32'd7, 32'd5, r);
    check("configuration kept over reset", r, 32'd12);

    $display("cfg_loads=%0d d3_loads=%0d gated_loads=%0d two_op=%0d three_op=%0d ctx_switches=%0d",
             n_cfg_load, n_d3_load, n_load_gated, n_two_op, n_three_op, n_ctx_switch);
    checks += 6;
    if (n_cfg_load == 0)   begin failures++; $display("FAIL no configuration load"); end
    if (n_d3_load == 0)    begin failures++; $display("FAIL no state-register load"); end
    if (n_load_gated == 0) begin failures++; $display("FAIL no suppressed load"); end
    if (n_two_op == 0)     begin failures++; $display("FAIL no two-operand execute"); end
    if (n_three_op == 0)   begin failures++; $display("FAIL no three-operand execute"); end
    if (n_ctx_switch == 0) begin failures++; $display("FAIL no context switch"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
