// adapto_lb: ADAPTO logic block (LB), a full adder made reconfigurable by
// forcing some of its pins.
//
// Structure (as in the LB schematic): a 3-input carry multiplexer picks the
// FA carry-in from the previous LB's carry (co), the configuration bit P or
// data input D3; a selector drives the FA's X input with D2 or P; D1 goes
// straight to the FA's Y input; an output multiplexer, steered by S2, passes
// either the sum R or the carry out. The carry out also always goes to the
// next LB of the stripe (cout).
//
//   S0 S1 | carry-in  X  |  with S2=0 (sum)      with S2=1 (carry)
//   0  0  | co        D2 |  SUM bit              carry of the adder
//   0  1  | P         D2 |  XOR (P=0) XNOR (P=1) AND (P=0) OR (P=1)
//   1  0  | D3        D2 |  3-input XOR          3-input majority
//   1  1  | 0         P  |  PASS D1 (P=0), NOT D1 (P=1)
//
// The operation table (which P/S0/S1/S2 give which function) and the pin
// names are the design's; the exact code-to-input mapping of the two
// multiplexers is derived from that table, and code 11 giving a zero
// carry-in is this design's reading of it. The original output stage
// inverts twice (nY then an inverter); the net output here is not inverted.
// Combinational; cfg comes from the LB's context memory.
module adapto_lb
  import adapto_pkg::*;
(
  input  logic    d1,
  input  logic    d2,
  input  logic    d3,
  input  logic    co,     // carry from the previous LB
  input  lb_cfg_t cfg,
  output logic    y,
  output logic    cout    // carry to the next LB
);
  logic cin, x, r, c;

  always_comb begin
    unique case ({cfg.s0, cfg.s1})
      2'b00:   cin = co;
      2'b01:   cin = cfg.p;
      2'b10:   cin = d3;
      default: cin = 1'b0;
    endcase
    x = ({cfg.s0, cfg.s1} == 2'b11) ? cfg.p : d2;
  end

  adapto_fa u_fa (.x(x), .y(d1), .cin(cin), .r(r), .cout(c));

  always_comb begin
    y    = cfg.s2 ? c : r;
    cout = c;
  end
endmodule
