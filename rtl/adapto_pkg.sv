// adapto_pkg: constants and types shared by the ADAPTO reconfigurable unit.
//
// ADAPTO is a 32-bit, 16-context reconfigurable functional unit built from
// three stripes of full-adder logic blocks (LBs) and three stripes of
// decoder-driven interconnect. This package holds the sizes the array is
// built with (word width and context count), the packed struct of the four
// configuration bits of one LB and the LB operation codes.
//
// The 32-bit width, 16 contexts and the operation table come from the design
// description; the bit order inside lb_cfg_t is this design's choice.
package adapto_pkg;

  localparam int unsigned ADAPTO_W    = 32;  // data path width
  localparam int unsigned ADAPTO_NCTX = 16;  // number of contexts
  localparam int unsigned LB_CFG = 4;   // S0, S1, S2, P

  // Configuration bits of one logic block. Bit 0 is S0, bit 3 is P; this is
  // also the order in which the lines of an LB context memory are written.
  typedef struct packed {
    logic p;
    logic s2;
    logic s1;
    logic s0;
  } lb_cfg_t;

  // LB operations (the full-adder operation table) as lb_cfg_t values;
  // LB_CARRY is the SUM setting with the carry output selected.
  localparam lb_cfg_t LB_SUM   = '{p: 1'b0, s2: 1'b0, s1: 1'b0, s0: 1'b0};
  localparam lb_cfg_t LB_CARRY = '{p: 1'b0, s2: 1'b1, s1: 1'b0, s0: 1'b0};
  localparam lb_cfg_t LB_AND2  = '{p: 1'b0, s2: 1'b1, s1: 1'b1, s0: 1'b0};
  localparam lb_cfg_t LB_XOR2  = '{p: 1'b0, s2: 1'b0, s1: 1'b1, s0: 1'b0};
  localparam lb_cfg_t LB_OR2   = '{p: 1'b1, s2: 1'b1, s1: 1'b1, s0: 1'b0};
  localparam lb_cfg_t LB_XNOR2 = '{p: 1'b1, s2: 1'b0, s1: 1'b1, s0: 1'b0};
  localparam lb_cfg_t LB_XOR3  = '{p: 1'b0, s2: 1'b0, s1: 1'b0, s0: 1'b1};
  localparam lb_cfg_t LB_MAJ3  = '{p: 1'b0, s2: 1'b1, s1: 1'b0, s0: 1'b1};
  localparam lb_cfg_t LB_NOT   = '{p: 1'b1, s2: 1'b0, s1: 1'b1, s0: 1'b1};
  localparam lb_cfg_t LB_PASS  = '{p: 1'b0, s2: 1'b0, s1: 1'b1, s0: 1'b1};

endpackage
