// tb_adapto: end-to-end test of the full ADAPTO array at its default size
// (32 bits, 16 contexts, 912-word configuration load).
//
// The testbench keeps a software image of every context memory (LB
// operations and interconnect codes per context, class adapto_image of
// adapto_tb_pkg), builds application configurations in it, serialises it
// into the 912-word load sequence and streams it through cfg_data. Each application is then executed and its
// result compared with arithmetic worked out here:
//   ctx 0      32-bit addition, including a carry through all 32 bits
//   ctx 1      four parallel 6-bit modular additions (X + Y) mod M
//   ctx 2      one Montgomery multiplication step, iterated 16 times with
//              the result fed back on D3; the product is checked modulo M
//   ctx 3..6   the four rows of AES MixColumns (one row per context)
//   ctx 7, 8   AES InvMixColumns first row, phase 1 and phase 2
//   ctx 9      bit reversal of each byte
//   ctx 10     big/little endian conversion
//   ctx 11     ~((D1 & D2) | D3)            (AND, OR, NOT, D3 routing)
//   ctx 12     carries of u + (u << 1), u = maj(~(D1^D2), D3, shifted)
//   ctx 15     reloaded in the background while ctx 0 keeps computing
// Every result is sampled without a clock edge after the operands and the
// context change (one operation per processor cycle), and cfg_busy must be
// high for exactly 912 cycles per load. Mechanisms exercised are counted
// and each must occur at least once.
module tb_adapto;
  import adapto_pkg::*;
  import adapto_tb_pkg::*;


  logic clk = 0, rst_n = 0, cfg_start = 0, cfg_busy;
  logic [31:0] cfg_data = '0;
  logic [3:0] ctx = '0;
  logic [31:0] d1 = '0, d2 = '0, d3 = '0, dout;

  adapto dut (
    .clk(clk), .rst_n(rst_n), .cfg_start(cfg_start), .cfg_data(cfg_data),
    .cfg_busy(cfg_busy), .ctx(ctx), .d1(d1), .d2(d2), .d3(d3), .dout(dout));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_load = 0, n_start_ignored = 0, n_bg_ops = 0, n_ctx_switch = 0;
  int n_full_carry = 0, n_mod_wrap = 0, n_mod_nowrap = 0, n_mont_addm = 0;
  logic [3:0] last_ctx = '0;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  adapto_tb_pkg::adapto_image img = new();
  int mods [4] = '{45, 37, 63, 33};
  localparam int MODN = 6;
  localparam int MN = 16;
  localparam longint MONT_M = 'hF1E3;

  // Stream the image; while it loads, optionally keep computing ctx 0
  // (32-bit add) every cycle and check it.
  task automatic load(bit background);
    int busy_cycles = 0;
    if (img.serialise() != NWORDS) begin failures++; $display("FAIL serialiser"); end
    @(negedge clk);
    cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    for (int n = 0; n < NWORDS; n++) begin
      cfg_data = img.words[n];
      if (n == 300) begin
        cfg_start = 1'b1;         // must be ignored: a load is running
        n_start_ignored++;
      end
      if (cfg_busy) busy_cycles++;
      if (background) begin
        ctx = 4'd0; d1 = $urandom; d2 = $urandom; #1;
        checks++;
        if (dout !== d1 + d2) begin
          failures++; $display("FAIL background add %h+%h=%h", d1, d2, dout);
        end
        n_bg_ops++;
      end
      @(negedge clk);
      cfg_start = 1'b0;
    end
    checks++;
    if (busy_cycles != NWORDS || cfg_busy) begin
      failures++; $display("FAIL load took %0d busy cycles", busy_cycles);
    end
    n_load++;
  endtask


  task automatic op(logic [3:0] c, logic [31:0] a1, logic [31:0] a2, logic [31:0] a3);
    if (c != last_ctx) n_ctx_switch++;
    last_ctx = c;
    ctx = c; d1 = a1; d2 = a2; d3 = a3;
    #1;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------------
  initial begin
    img.cfg_add(0);
    img.cfg_modadd(1, mods, MODN);
    img.cfg_mont(2, MONT_M, MN);
    // MixColumns rows (2 3 1 1), (1 2 3 1), (1 1 2 3), (3 1 1 2);
    // byte position 3 = A (bits 31:24) ... 0 = D
    img.cfg_mixrow(3, 3, 2, 1, 0);
    img.cfg_mixrow(4, 2, 1, 3, 0);
    img.cfg_mixrow(5, 1, 0, 3, 2);
    img.cfg_mixrow(6, 0, 3, 2, 1);
    img.cfg_invmix_p1(7, 4'b1010);         // (0x0C A, 0x08 B, 0x0C C, 0x08 D)
    img.cfg_invmix_p2(8, 3, 2, 1, 0);
    img.cfg_permute(9, 1'b0);
    img.cfg_permute(10, 1'b1);
    img.cfg_logic(11);
    img.cfg_carry(12);
    img.cfg_add(15);                       // first image of ctx 15: d1 + d2

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(1'b0);

    // ---- ctx 0: 32-bit addition
    op(0, 32'hFFFF_FFFF, 32'h1, 0);
    expect_eq("add full carry", dout, 32'h0);
    if (dout == 0) n_full_carry++;
    for (int t = 0; t < 50; t++) begin
      op(0, $urandom, $urandom, $urandom);
      expect_eq("add", dout, d1 + d2);
    end
    op(15, 32'h1234_5678, 32'h0F0F_0F0F, 32'hFFFF_0000);
    expect_eq("first image of ctx 15", dout, 32'h1234_5678 + 32'h0F0F_0F0F);

    // ---- ctx 1: modular addition
    for (int t = 0; t < 200; t++) begin
      automatic logic [31:0] x = 0, y = 0, e = 0;
      for (int l = 0; l < 4; l++) begin
        automatic int xv = $urandom_range(0, mods[l] - 1), yv = $urandom_range(0, mods[l] - 1);
        if (t == 0) begin xv = mods[l] - 1; yv = mods[l] - 1; end
        if (t == 1) begin xv = 0; yv = 0; end
        if (t == 2) begin xv = mods[l] - 1; yv = 1; end
        x[8*l +: 8] = 8'(xv); y[8*l +: 8] = 8'(yv);
        e[8*l +: 8] = 8'((xv + yv) % mods[l]);
        if (xv + yv >= mods[l]) n_mod_wrap++; else n_mod_nowrap++;
      end
      op(1, x, y, 0);
      expect_eq("modular add", dout, e);
    end

    // ---- ctx 2: Montgomery multiplication, one loop iteration per cycle
    for (int t = 0; t < 20; t++) begin
      automatic longint a = longint'($urandom_range(0, 32'(MONT_M - 1)));
      automatic longint b = longint'($urandom_range(0, 32'(MONT_M - 1)));
      automatic longint r = 0, rs;
      automatic logic [31:0] rr = 0;
      for (int i = 0; i < MN; i++) begin
        op(2, 32'(b), a[i] ? 32'hFFFF_FFFF : 32'h0, rr);
        rs = r + (a[i] ? b : 0);
        if (rs % 2 == 1) begin rs += MONT_M; n_mont_addm++; end
        r = rs / 2;
        expect_eq("montgomery step", dout, 32'(r));
        rr = dout;
      end
      // R * 2^n == A * B (mod M), and R < 2M
      checks++;
      if (((longint'(rr) << MN) % MONT_M) != ((a * b) % MONT_M) || longint'(rr) >= 2 * MONT_M) begin
        failures++;
        $display("FAIL montgomery product a=%0d b=%0d r=%0d", a, b, rr);
      end
    end

    // ---- ctx 3..6: MixColumns, one row per context, one cycle per row
    for (int t = 0; t < 30; t++) begin
      logic [7:0] col [4];
      logic [31:0] w;
      logic [7:0] e [4];
      if (t == 0) begin col = '{8'hdb, 8'h13, 8'h53, 8'h45}; end
      else for (int r = 0; r < 4; r++) col[r] = 8'($urandom);
      w = {col[0], col[1], col[2], col[3]};
      e[0] = gmul(col[0], 2) ^ gmul(col[1], 3) ^ col[2] ^ col[3];
      e[1] = col[0] ^ gmul(col[1], 2) ^ gmul(col[2], 3) ^ col[3];
      e[2] = col[0] ^ col[1] ^ gmul(col[2], 2) ^ gmul(col[3], 3);
      e[3] = gmul(col[0], 3) ^ col[1] ^ col[2] ^ gmul(col[3], 2);
      if (t == 0 && {e[0], e[1], e[2], e[3]} != 32'h8e4da1bc) begin
        failures++; $display("FAIL reference MixColumns");
      end
      for (int r = 0; r < 4; r++) begin
        op(4'(3 + r), w, 0, 0);
        expect_eq("mixcolumns row", dout, {24'h0, e[r]});
      end
    end

    // ---- ctx 7, 8: InvMixColumns, first row, two phases
    for (int t = 0; t < 30; t++) begin
      logic [7:0] col [4];
      logic [31:0] w, g;
      logic [7:0] e;
      if (t == 0) col = '{8'h8e, 8'h4d, 8'ha1, 8'hbc};
      else for (int r = 0; r < 4; r++) col[r] = 8'($urandom);
      w = {col[0], col[1], col[2], col[3]};
      e = gmul(col[0], 8'h0E) ^ gmul(col[1], 8'h0B) ^ gmul(col[2], 8'h0D) ^ gmul(col[3], 8'h09);
      if (t == 0 && e != 8'hdb) begin failures++; $display("FAIL reference InvMixColumns"); end
      op(7, w, 0, 0);
      expect_eq("invmix phase 1", dout, {gmul(col[0], 8'h0C), gmul(col[1], 8'h08),
                                         gmul(col[2], 8'h0C), gmul(col[3], 8'h08)});
      g = dout;
      op(8, w, g, g);
      expect_eq("invmix phase 2", dout, {24'h0, e});
    end

    // ---- ctx 9..12: bit manipulation and logic
    for (int t = 0; t < 50; t++) begin
      automatic logic [31:0] a = $urandom, b = $urandom, c3 = $urandom, e, tx, u;
      op(9, a, b, c3);
      for (int i = 0; i < 32; i++) e[i] = a[8*(i/8) + 7 - (i%8)];
      expect_eq("byte bit reversal", dout, e);
      op(10, a, b, c3);
      expect_eq("endian conversion", dout, {a[7:0], a[15:8], a[23:16], a[31:24]});
      op(11, a, b, c3);
      expect_eq("logic ~((d1&d2)|d3)", dout, ~((a & b) | c3));
      op(12, a, b, c3);
      tx = ~(a ^ b);
      u = (tx & c3) | (tx & {1'b1, tx[31:1]}) | (c3 & {1'b1, tx[31:1]});
      begin
        automatic logic [32:0] s = {1'b0, u} + {1'b0, u[30:0], 1'b0};
        e = s[32:1] ^ {1'b0, u[31:1] ^ u[30:0]};
      end
      expect_eq("carry vector", dout, e);
    end

    // ---- reload with a new ctx 15 while ctx 0 keeps running
    img.clear_ctx(15);
    img.cfg_xor3(15);
    load(1'b1);
    for (int t = 0; t < 20; t++) begin
      op(15, $urandom, $urandom, $urandom);
      expect_eq("reloaded ctx 15", dout, d1 ^ d2 ^ d3);
      op(0, d1, d2, d3);
      expect_eq("ctx 0 kept", dout, d1 + d2);
    end

    // ---- mechanisms
    $display("loads=%0d start_ignored=%0d background_ops=%0d ctx_switches=%0d",
             n_load, n_start_ignored, n_bg_ops, n_ctx_switch);
    $display("full_carry=%0d mod_wrap=%0d mod_nowrap=%0d mont_add_m=%0d",
             n_full_carry, n_mod_wrap, n_mod_nowrap, n_mont_addm);
    checks++;
    if (n_load < 2 || n_start_ignored == 0 || n_bg_ops == 0 || n_ctx_switch == 0 ||
        n_full_carry == 0 || n_mod_wrap == 0 || n_mod_nowrap == 0 || n_mont_addm == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
