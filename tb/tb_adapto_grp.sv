// tb_adapto_grp: GRP bit permutation on the ADAPTO unit, with the mask
// compiled into the configuration of a context.
//
// GRP gathers the operand bits selected by 1s in a mask to the right of the
// result and the bits selected by 0s to the left, each group in its
// original order. With the mask known when the configuration is built, GRP
// is a fixed permutation that interconnect 1 performs alone: stripe 1
// passes d1, stripe 2 picks the routed bits, stripe 3 and interconnect 3
// pass them to dout. The testbench loads eight masks into contexts 0..7
// (all ones, all zeros, alternating, byte patterns and random ones) and
// compares each result, one operation per cycle, with a bit-by-bit model of
// the C routine of the instruction. It also composes five GRP operations
// with masks chosen from a target permutation (a radix sort on the bits of
// the destination index, least significant bit first) to show that log2(32)
// = 5 of them reach an arbitrary permutation, here the bit reversal of the
// 32-bit word.
module tb_adapto_grp;
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

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  adapto_tb_pkg::adapto_image img = new();

  logic [31:0] masks [13];

  // the C routine: ones of the mask to the right, then zeros
  function automatic logic [31:0] grp_ref(logic [31:0] mask, logic [31:0] x);
    logic [31:0] o = '0;
    int t = 0;
    for (int i = 0; i < 32; i++) if (mask[i])  begin o[t] = x[i]; t++; end
    for (int i = 0; i < 32; i++) if (!mask[i]) begin o[t] = x[i]; t++; end
    return o;
  endfunction

  task automatic op(logic [3:0] c, logic [31:0] a1, output logic [31:0] r);
    @(negedge clk);
    ctx = c; d1 = a1; d2 = $urandom; d3 = $urandom;   // d2, d3 are ignored
    #4 r = dout;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] r, x, y;
    int dest [32];      // destination of the bit now at each position
    int nd [32];
    int nwords;

    masks[0] = '1;
    masks[1] = '0;
    masks[2] = 32'h5555_5555;
    masks[3] = 32'hF0F0_00FF;
    masks[4] = 32'h8000_0001;
    for (int k = 5; k < 8; k++) masks[k] = $urandom;

    // five masks that together reverse the bits: step s gathers to the
    // right the bits whose destination has bit s equal to 0
    for (int i = 0; i < 32; i++) dest[i] = 31 - i;
    for (int s = 0; s < 5; s++) begin
      int t = 0;
      for (int i = 0; i < 32; i++) masks[8 + s][i] = ((dest[i] >> s) & 1) == 0;
      for (int pass = 1; pass >= 0; pass--)
        for (int i = 0; i < 32; i++)
          if (masks[8 + s][i] == pass[0]) begin nd[t] = dest[i]; t++; end
      dest = nd;
    end

    for (int k = 0; k < 13; k++) img.cfg_grp(k, masks[k]);
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

    for (int t = 0; t < 100; t++) begin
      x = (t == 0) ? 32'h0000_0001 : $urandom;
      for (int k = 0; k < 13; k++) begin
        op(4'(k), x, r);
        check($sformatf("GRP mask %h", masks[k]), r, grp_ref(masks[k], x));
      end
      y = x;
      for (int s = 0; s < 5; s++) op(4'(8 + s), y, y);
      check("five GRP steps = bit reversal", y, {<<{x}});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
