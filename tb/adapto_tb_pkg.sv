// adapto_tb_pkg: configuration compiler and reference arithmetic shared by
// the ADAPTO end-to-end testbenches.
//
// class adapto_image holds one complete configuration of the array: the LB
// setting of every LB of the three stripes and the code of every decoder of
// the three interconnect stripes, for each of the 16 contexts. Builder
// methods write application mappings into one context; serialise() turns
// the whole image into the 912-word sequence the array loads through its
// configuration bus:
//   for each stripe s = 1..3: LB memories, then interconnect memories;
//   inside a segment element couples (2k, 2k+1), k = 0 first, and for each
//   couple one word per configuration bit b (LB: S0, S1, S2, P; decoder:
//   code bit 0 upwards); word[c] = bit b of element 2k in context c,
//   word[16 + c] = bit b of element 2k+1 in context c.
// Interconnect codes: interconnect 1 uses 0..31 stripe-1 outputs, 32..63
// D3, 64 constant 0, 65 constant 1; interconnects 2 and 3 use 0..31 LB
// outputs, 32 constant 0, 33 constant 1. Pin p of LB i of stripes 2 and 3
// is decoder 3*i + p.
package adapto_tb_pkg;
  import adapto_pkg::*;

  localparam int W = 32, NCTX = 16, NPIN = 96, NWORDS = 912;
  localparam int C1_D3 = 32, C1_0 = 64, C1_1 = 65, C_0 = 32, C_1 = 33;
  localparam logic [7:0] RED  = 8'h1B;   // x^4 + x^3 + x + 1
  localparam logic [7:0] RED2 = 8'h36;   // x^5 + x^4 + x^2 + x

  // GF(2^8) arithmetic, polynomial x^8 + x^4 + x^3 + x + 1
  function automatic logic [7:0] xt(logic [7:0] p);
    return {p[6:0], 1'b0} ^ (p[7] ? RED : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = xt(a);
    end
    return r;
  endfunction

  class adapto_image;
    lb_cfg_t     lbc [3][W][NCTX];
    int          ic1 [NPIN][NCTX];
    int          ic2 [NPIN][NCTX];
    int          ic3 [W][NCTX];
    logic [31:0] words [NWORDS];

    function new();
      for (int c = 0; c < NCTX; c++) clear_ctx(c);
    endfunction

    // every LB passes D1, every decoder selects constant 0
    function void clear_ctx(int c);
      for (int i = 0; i < W; i++) begin
        for (int s = 0; s < 3; s++) lbc[s][i][c] = LB_PASS;
        ic3[i][c] = C_0;
      end
      for (int j = 0; j < NPIN; j++) begin ic1[j][c] = C1_0; ic2[j][c] = C_0; end
    endfunction

    // pin p of LB i of stripe 2 (3) <- code of interconnect 1 (2)
    function void s2pin(int c, int i, int p, int code); ic1[3*i+p][c] = code; endfunction
    function void s3pin(int c, int i, int p, int code); ic2[3*i+p][c] = code; endfunction

    // stripes 2 and 3 pass the stripe-1 outputs straight to dout
    function void pass_23(int c);
      for (int i = 0; i < W; i++) begin
        s2pin(c, i, 0, i); s3pin(c, i, 0, i); ic3[i][c] = i;
        lbc[1][i][c] = LB_PASS; lbc[2][i][c] = LB_PASS;
      end
    endfunction

    // returns the number of words produced (NWORDS)
    function int serialise();
      int n = 0;
      for (int s = 0; s < 3; s++) begin
        int nd   = (s == 2) ? W : NPIN;
        int selw = (s == 0) ? 7 : 6;
        for (int k = 0; k < W / 2; k++)
          for (int b = 0; b < 4; b++) begin
            for (int c = 0; c < NCTX; c++) begin
              words[n][c]      = lbc[s][2*k][c][b];
              words[n][16 + c] = lbc[s][2*k+1][c][b];
            end
            n++;
          end
        for (int k = 0; k < nd / 2; k++)
          for (int b = 0; b < selw; b++) begin
            for (int c = 0; c < NCTX; c++) begin
              int ce = (s == 0) ? ic1[2*k][c] : (s == 1) ? ic2[2*k][c] : ic3[2*k][c];
              int co = (s == 0) ? ic1[2*k+1][c] : (s == 1) ? ic2[2*k+1][c] : ic3[2*k+1][c];
              words[n][c]      = ce[b];
              words[n][16 + c] = co[b];
            end
            n++;
          end
      end
      return n;
    endfunction

    // ---- application mappings (each expects a cleared context) ----------

    // dout = d1 + d2
    function void cfg_add(int c);
      for (int i = 0; i < W; i++) lbc[0][i][c] = LB_SUM;
      pass_23(c);
    endfunction

    // (X + Y) mod m for an n-bit modulus on columns o .. o+n+1: stripe 1
    // S1 = X + Y, stripe 2 S2 = S1 + 2^(n+1) - m with column o+n+1 as a
    // routing cell that outputs the inverted carry (1 + 0 + carry), stripe 3
    // S2 + (m AND not carry). Result on dout[o+n-1:o]; operands < m.
    function void cfg_modadd_lane(int c, int o, longint m, int n);
      longint negm = (longint'(1) << (n + 1)) - m;
      for (int j = 0; j <= n; j++) lbc[0][o+j][c] = (j == 0) ? LB_XOR2 : LB_SUM;
      lbc[0][o+n+1][c] = LB_PASS;
      for (int j = 0; j <= n; j++) begin
        lbc[1][o+j][c] = (j == 0) ? LB_XOR2 : LB_SUM;
        s2pin(c, o+j, 0, o+j);
        s2pin(c, o+j, 1, negm[j] ? C1_1 : C1_0);
      end
      lbc[1][o+n+1][c] = LB_SUM;
      s2pin(c, o+n+1, 0, C1_1);
      s2pin(c, o+n+1, 1, C1_0);
      for (int j = 0; j < n; j++) begin
        lbc[2][o+j][c] = (j == 0) ? LB_XOR2 : LB_SUM;
        s3pin(c, o+j, 0, o+j);
        s3pin(c, o+j, 1, m[j] ? o+n+1 : C_0);
        ic3[o+j][c] = o+j;
      end
    endfunction

    // four lanes of 8 columns, lane l at bits 8l.., modulus m[l] of n <= 6 bits
    function void cfg_modadd(int c, int m [4], int n);
      for (int l = 0; l < 4; l++) cfg_modadd_lane(c, 8 * l, m[l], n);
    endfunction

    // One Montgomery iteration for an n-bit odd modulus mm:
    // d1 = B, d2 = a_i replicated, d3 = R; dout = (R + a_i B + q mm) / 2.
    function void cfg_mont(int c, longint mm, int n);
      for (int i = 0; i < W; i++) lbc[0][i][c] = LB_AND2;
      for (int j = 0; j <= n + 1; j++) begin
        lbc[1][j][c] = (j == 0) ? LB_XOR2 : LB_SUM;
        s2pin(c, j, 0, j);
        s2pin(c, j, 1, C1_D3 + j);
        lbc[2][j][c] = (j == 0) ? LB_XOR2 : LB_SUM;
        s3pin(c, j, 0, j);
        s3pin(c, j, 1, (j < n && mm[j]) ? 0 : C_0);
      end
      for (int j = 0; j <= n; j++) ic3[j][c] = j + 1;   // >> 1
    endfunction

    // One MixColumns row: dout[7:0] = 2*X ^ 3*Y ^ U ^ V where X, Y, U, V
    // are the bytes of d1 at byte positions b2, b3, b1a, b1b.
    function void cfg_mixrow(int c, int b2, int b3, int b1a, int b1b);
      for (int k = 0; k < 8; k++) begin
        lbc[1][24+k][c] = LB_XOR3;                     // 2 * X
        s2pin(c, 24+k, 0, k > 0 ? 8*b2 + k - 1 : C1_0);
        s2pin(c, 24+k, 1, RED[k] ? 8*b2 + 7 : C1_0);
        lbc[1][16+k][c] = LB_XOR3;                     // 3 * Y
        s2pin(c, 16+k, 0, 8*b3 + k);
        s2pin(c, 16+k, 1, k > 0 ? 8*b3 + k - 1 : C1_0);
        s2pin(c, 16+k, 2, RED[k] ? 8*b3 + 7 : C1_0);
        lbc[1][8+k][c] = LB_XOR3;                      // U ^ V
        s2pin(c, 8+k, 0, 8*b1a + k);
        s2pin(c, 8+k, 1, 8*b1b + k);
        lbc[2][k][c] = LB_XOR3;
        s3pin(c, k, 0, 24+k); s3pin(c, k, 1, 16+k); s3pin(c, k, 2, 8+k);
        ic3[k][c] = k;
      end
    endfunction

    // InvMixColumns phase 1: byte b of dout = 0x0C * byte b of d1 where
    // mask12[b] is set, 0x08 * byte b elsewhere (both via 0x04 * P).
    function void cfg_invmix_p1(int c, logic [3:0] mask12);
      for (int b = 0; b < 4; b++)
        for (int k = 0; k < 8; k++) begin
          int i = 8*b + k;
          lbc[1][i][c] = LB_XOR3;                      // 0x04 * P
          s2pin(c, i, 0, k >= 2 ? i - 2 : C1_0);
          s2pin(c, i, 1, RED2[k] ? 8*b + 7 : C1_0);
          s2pin(c, i, 2, RED[k] ? 8*b + 6 : C1_0);
          lbc[2][i][c] = LB_XOR3;
          if (mask12[b]) begin                         // 0x03 * (0x04 * P)
            s3pin(c, i, 0, i);
            s3pin(c, i, 1, k > 0 ? i - 1 : C_0);
            s3pin(c, i, 2, RED[k] ? 8*b + 7 : C_0);
          end else begin                               // 0x02 * (0x04 * P)
            s3pin(c, i, 0, k > 0 ? i - 1 : C_0);
            s3pin(c, i, 1, RED[k] ? 8*b + 7 : C_0);
          end
          ic3[i][c] = i;
        end
    endfunction

    // InvMixColumns phase 2: d1 = column, d2 = d3 = phase-1 result G.
    // dout[7:0] = (2*X ^ G[x2]) ^ 3*Y ^ G[x3] ^ (U ^ G[x1a]) ^ (V ^ G[x1b])
    // with X, Y, U, V the d1 bytes at positions x2, x3, x1a, x1b.
    function void cfg_invmix_p2(int c, int x2, int x3, int x1a, int x1b);
      for (int k = 0; k < 8; k++) begin
        lbc[0][8*x1a+k][c] = LB_XOR2;                 // U ^ G[x1a]
        lbc[0][8*x1b+k][c] = LB_XOR2;                 // V ^ G[x1b]
        lbc[1][24+k][c] = LB_XOR3;                     // 2*X ^ G[x2]
        s2pin(c, 24+k, 0, k > 0 ? 8*x2 + k - 1 : C1_0);
        s2pin(c, 24+k, 1, RED[k] ? 8*x2 + 7 : C1_0);
        s2pin(c, 24+k, 2, C1_D3 + 8*x2 + k);
        lbc[1][16+k][c] = LB_XOR3;                     // 3*Y
        s2pin(c, 16+k, 0, 8*x3 + k);
        s2pin(c, 16+k, 1, k > 0 ? 8*x3 + k - 1 : C1_0);
        s2pin(c, 16+k, 2, RED[k] ? 8*x3 + 7 : C1_0);
        lbc[1][8+k][c] = LB_XOR3;                      // G[x3] ^ ...
        s2pin(c, 8+k, 0, C1_D3 + 8*x3 + k);
        s2pin(c, 8+k, 1, 8*x1a + k);
        s2pin(c, 8+k, 2, 8*x1b + k);
        lbc[2][k][c] = LB_XOR3;
        s3pin(c, k, 0, 24+k); s3pin(c, k, 1, 16+k); s3pin(c, k, 2, 8+k);
        ic3[k][c] = k;
      end
    endfunction

    // bit reversal inside each byte, or byte swap (endian conversion)
    function void cfg_permute(int c, bit endian);
      for (int b = 0; b < 4; b++)
        for (int k = 0; k < 8; k++)
          s2pin(c, 8*b + k, 0, endian ? 8*(3-b) + k : 8*b + 7 - k);
      for (int i = 0; i < W; i++) begin
        s3pin(c, i, 0, i); ic3[i][c] = i;
      end
    endfunction

    // GRP with a mask fixed in the context: the d1 bits selected by 1s in
    // mask are gathered, in order, to the low end of dout and the bits
    // selected by 0s follow above them. Pure interconnect routing.
    function void cfg_grp(int c, logic [31:0] mask);
      int t = 0;
      for (int pass = 1; pass >= 0; pass--)
        for (int i = 0; i < W; i++)
          if (mask[i] == pass[0]) begin
            s2pin(c, t, 0, i);
            t++;
          end
      for (int i = 0; i < W; i++) begin
        s3pin(c, i, 0, i); ic3[i][c] = i;
      end
    endfunction

    // One step of the MPEG-2 half-pel distance: d1 = k = p1[t] + p1[t+1]
    // (9 bits), d2 = z << 16 with z = p2[t]; dout = ((k + 1) >> 1) - z as a
    // 32-bit two's-complement value. Stripe 1 forms k + 1 in columns 0..15
    // (carry-in P = 1 at column 0) and ~z in columns 16..31 (XNOR with the
    // zero upper bits of d1). Stripe 2 adds (k + 1) >> 1, routed down by one
    // column, to ~z (sign-extended) with a constant 1 carry into column 0.
    function void cfg_dist1(int c);
      for (int i = 0; i < W; i++)
        lbc[0][i][c] = (i == 0 || i >= 16) ? LB_XNOR2 : LB_SUM;
      for (int i = 0; i < W; i++) begin
        lbc[1][i][c] = (i == 0) ? LB_XOR3 : LB_SUM;
        s2pin(c, i, 0, i < 8 ? i + 1 : C1_0);
        s2pin(c, i, 1, i < 16 ? 16 + i : 31);
        s2pin(c, i, 2, i == 0 ? C1_1 : C1_0);
        s3pin(c, i, 0, i); ic3[i][c] = i;
      end
    endfunction

    // dout = ~((d1 & d2) | d3)
    function void cfg_logic(int c);
      for (int i = 0; i < W; i++) begin
        lbc[0][i][c] = LB_AND2;
        lbc[1][i][c] = LB_OR2;
        s2pin(c, i, 0, i); s2pin(c, i, 1, C1_D3 + i);
        lbc[2][i][c] = LB_NOT;
        s3pin(c, i, 0, i);
        ic3[i][c] = i;
      end
    endfunction

    // t = ~(d1 ^ d2); u = maj(t, d3, {1, t >> 1}); dout = carries of u + (u << 1)
    function void cfg_carry(int c);
      for (int i = 0; i < W; i++) begin
        lbc[0][i][c] = LB_XNOR2;
        lbc[1][i][c] = LB_MAJ3;
        s2pin(c, i, 0, i); s2pin(c, i, 1, C1_D3 + i);
        s2pin(c, i, 2, i < W - 1 ? i + 1 : C1_1);
        lbc[2][i][c] = LB_CARRY;
        s3pin(c, i, 0, i); s3pin(c, i, 1, i > 0 ? i - 1 : C_0);
        ic3[i][c] = i;
      end
    endfunction

    // dout = d1 ^ d2 ^ d3
    function void cfg_xor3(int c);
      for (int i = 0; i < W; i++) begin
        lbc[0][i][c] = LB_XOR2;
        lbc[1][i][c] = LB_XOR3;
        s2pin(c, i, 0, i); s2pin(c, i, 1, C1_D3 + i); s2pin(c, i, 2, C1_0);
        s3pin(c, i, 0, i); ic3[i][c] = i;
      end
    endfunction
  endclass
endpackage
