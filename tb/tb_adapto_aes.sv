// tb_adapto_aes: AES MixColumns / InvMixColumns workload on the ADAPTO unit.
//
// The testbench loads one configuration image (through cfg_start / cfg_data,
// 912 words) that holds ten contexts:
//   ctx 0..3  MixColumns row r: dout[7:0] = row r of the matrix
//             (02 03 01 01 rotated) applied to the column in d1
//   ctx 4, 5  InvMixColumns phase 1: per byte 0x0C*x or 0x08*x (masks 1010
//             and 0101), computed for the whole column at once
//   ctx 6..9  InvMixColumns phase 2 row r: d1 = column, d2 = d3 = the
//             phase-1 word whose mask matches row r
// A column word carries row 0 in bits 31:24 and row 3 in bits 7:0.
// Every operation is issued in one clock cycle: the array is combinational
// and the context changes every cycle. For a 16-byte state MixColumns takes
// 16 operations and InvMixColumns 8 + 16 = 24; the testbench counts both the
// issued operations and the clock cycles and checks them. Results are
// compared with a GF(2^8) reference, against the FIPS-197 round-1 column
// (d4 bf 5d 30 -> 04 66 81 e5) and by the round trip InvMix(Mix(s)) = s
// on random states.
module tb_adapto_aes;
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
  int n_ops = 0, n_cycles = 0;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) n_cycles++;

  adapto_tb_pkg::adapto_image img = new();

  typedef logic [31:0] state_t [4];   // four columns

  // mixing matrices, row r, column j (byte j of the column = bits 31-8j)
  function automatic logic [7:0] mix_coef(bit inv, int r, int j);
    logic [7:0] fwd [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    logic [7:0] bwd [4] = '{8'h0E, 8'h0B, 8'h0D, 8'h09};
    return inv ? bwd[(j - r + 4) % 4] : fwd[(j - r + 4) % 4];
  endfunction

  function automatic logic [31:0] ref_col(bit inv, logic [31:0] col);
    logic [31:0] o = '0;
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < 4; j++)
        o[31-8*r -: 8] ^= gmul(col[31-8*j -: 8], mix_coef(inv, r, j));
    return o;
  endfunction

  // one operation per clock cycle: drive at the falling edge, sample dout
  // before the next rising edge. A sequence of n operations started just
  // after a rising edge therefore ends just after the n-th rising edge.
  task automatic op(logic [3:0] c, logic [31:0] a1, logic [31:0] a2,
                    logic [31:0] a3, output logic [31:0] r);
    @(negedge clk);
    ctx = c; d1 = a1; d2 = a2; d3 = a3;
    n_ops++;
    #4 r = dout;
  endtask

  task automatic mix_state(input state_t s, output state_t o);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) begin
      o[k] = '0;
      for (int row = 0; row < 4; row++) begin
        op(4'(row), s[k], '0, '0, r);
        o[k][31-8*row -: 8] = r[7:0];
      end
    end
  endtask

  task automatic invmix_state(input state_t s, output state_t o);
    logic [31:0] g [4][2];
    logic [31:0] r;
    for (int k = 0; k < 4; k++) begin
      op(4'd4, s[k], '0, '0, g[k][0]);
      op(4'd5, s[k], '0, '0, g[k][1]);
    end
    for (int k = 0; k < 4; k++) begin
      o[k] = '0;
      for (int row = 0; row < 4; row++) begin
        op(4'(6 + row), s[k], g[k][row % 2], g[k][row % 2], r);
        o[k][31-8*row -: 8] = r[7:0];
      end
    end
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic check_count(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    state_t s, m, back;
    int ops0, cyc0;
    int nwords;

    // MixColumns rows (02 03 01 01), (01 02 03 01), (01 01 02 03), (03 01 01 02)
    img.cfg_mixrow(0, 3, 2, 1, 0);
    img.cfg_mixrow(1, 2, 1, 3, 0);
    img.cfg_mixrow(2, 1, 0, 3, 2);
    img.cfg_mixrow(3, 0, 3, 2, 1);
    img.cfg_invmix_p1(4, 4'b1010);
    img.cfg_invmix_p1(5, 4'b0101);
    // InvMixColumns rows (0E 0B 0D 09), (09 0E 0B 0D), (0D 09 0E 0B), (0B 0D 09 0E)
    img.cfg_invmix_p2(6, 3, 2, 1, 0);
    img.cfg_invmix_p2(7, 2, 1, 3, 0);
    img.cfg_invmix_p2(8, 1, 0, 3, 2);
    img.cfg_invmix_p2(9, 0, 3, 2, 1);
    nwords = img.serialise();
    check_count("load words", nwords, NWORDS);

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

    // FIPS-197 appendix B, round 1, first column
    s = '{32'hD4BF5D30, 32'hE0B452AE, 32'hB84111F1, 32'h1E2798E5};
    mix_state(s, m);
    check("FIPS-197 column 0", m[0], 32'h046681E5);
    for (int k = 0; k < 4; k++) check("MixColumns FIPS state", m[k], ref_col(0, s[k]));
    invmix_state(m, back);
    for (int k = 0; k < 4; k++) check("InvMixColumns FIPS state", back[k], s[k]);

    for (int t = 0; t < 64; t++) begin
      for (int k = 0; k < 4; k++) s[k] = $urandom;
      @(posedge clk); #1;
      ops0 = n_ops; cyc0 = n_cycles;
      mix_state(s, m);
      @(posedge clk); #1;
      check_count("MixColumns operations", n_ops - ops0, 16);
      check_count("MixColumns cycles", n_cycles - cyc0, 16);
      for (int k = 0; k < 4; k++) check("MixColumns", m[k], ref_col(0, s[k]));

      ops0 = n_ops; cyc0 = n_cycles;
      invmix_state(m, back);
      @(posedge clk); #1;
      check_count("InvMixColumns operations", n_ops - ops0, 24);
      check_count("InvMixColumns cycles", n_cycles - cyc0, 24);
      for (int k = 0; k < 4; k++) begin
        check("InvMixColumns", back[k], ref_col(1, m[k]));
        check("round trip", back[k], s[k]);
      end
    end

    $display("operations=%0d", n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
