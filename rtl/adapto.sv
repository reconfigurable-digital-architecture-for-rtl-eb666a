// adapto: ADAPTO (Adder-based Dynamic Architecture for Processing Tailored
// Operators), a 16-context reconfigurable functional unit meant to sit
// beside a processor's ALU and execute sub-word arithmetic and bit-level
// operations in one processor cycle.
//
// Data path (top to bottom, no feedback):
//   LB stripe 1   32 logic blocks; LB i gets D1[i] and D2[i]
//   interconnect1 66 wires (stripe-1 outputs, D3, constant 0, constant 1),
//                 96 outputs = the D1/D2/D3 pins of the 32 LBs of stripe 2,
//                 7-bit codes
//   LB stripe 2
//   interconnect2 34 wires (stripe-2 outputs, 0, 1), 96 outputs, 6-bit codes
//   LB stripe 3
//   interconnect3 34 wires (stripe-3 outputs, 0, 1), 32 outputs = DOUT,
//                 6-bit codes
// Every LB and every decoder reads its configuration from its own 16-word
// context memory, addressed by ctx, so switching context is just changing
// ctx: d1/d2/d3/ctx -> dout is one combinational path.
//
// Code numbers: interconnect 1 codes 0..31 = stripe-1 output i, 32..63 =
// D3[i-32], 64 = 0, 65 = 1; interconnects 2 and 3 codes 0..31 = LB output,
// 32 = 0, 33 = 1; any other code gives 0. Output 3*i+p of interconnects 1
// and 2 drives pin D(p+1) of LB i of the next stripe. The D3 pins of
// stripe 1 are tied to 0.
//
// Configuration load: pulse cfg_start, then present one 32-bit word per
// clock on cfg_data, word n at the (n+1)-th rising edge after the one that
// saw cfg_start; 912 words load all 29184 configuration bits (all 16
// contexts at once). Word order: LB stripe 1 (64 words), interconnect 1
// (336), LB stripe 2 (64), interconnect 2 (288), LB stripe 3 (64),
// interconnect 3 (96). Inside a segment element couples (2k, 2k+1) are
// written left to right (LB0 first), one configuration bit per word:
// bits [15:0] are that bit of element 2k for contexts 0..15, bits [31:16]
// the same for element 2k+1. ctx may change and the array may compute
// while a load is in progress; a context read while its lines are being
// rewritten mixes old and new bits.
//
// The stripe structure, sizes, wire counts, code widths, memory capacity,
// bus split and the flip-flop-chain write scheme follow the design
// description. The code numbering, pin order of the interconnect outputs,
// tie-offs and load timing are this design's choices.
module adapto
  import adapto_pkg::*;
#(
  parameter int unsigned W    = ADAPTO_W,
  parameter int unsigned NCTX = ADAPTO_NCTX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    cfg_start,
  input  logic [2*NCTX-1:0]       cfg_data,
  output logic                    cfg_busy,
  // execution
  input  logic [$clog2(NCTX)-1:0] ctx,
  input  logic [W-1:0]            d1,
  input  logic [W-1:0]            d2,
  input  logic [W-1:0]            d3,
  output logic [W-1:0]            dout
);
  localparam int unsigned NIN1  = 2 * W + 2;
  localparam int unsigned NIN2  = W + 2;
  localparam int unsigned SEL1  = $clog2(NIN1);
  localparam int unsigned SEL2  = $clog2(NIN2);
  localparam int unsigned NPIN  = 3 * W;           // LB inputs of one stripe

  // Lengths and start positions of the six segments of the chain.
  localparam int unsigned L_LB  = (W / 2) * LB_CFG;
  localparam int unsigned L_IC1 = (NPIN / 2) * SEL1;
  localparam int unsigned L_IC2 = (NPIN / 2) * SEL2;
  localparam int unsigned L_IC3 = (W / 2) * SEL2;
  localparam int unsigned B_LB1 = 0;
  localparam int unsigned B_IC1 = B_LB1 + L_LB;
  localparam int unsigned B_LB2 = B_IC1 + L_IC1;
  localparam int unsigned B_IC2 = B_LB2 + L_LB;
  localparam int unsigned B_LB3 = B_IC2 + L_IC2;
  localparam int unsigned B_IC3 = B_LB3 + L_LB;
  localparam int unsigned LEN   = B_IC3 + L_IC3;   // 912 at W = 32

  logic [LEN-1:0] line_en;

  adapto_cfg_chain #(.LEN(LEN)) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (cfg_start),
    .line_en(line_en),
    .busy   (cfg_busy)
  );

  // ---- stripe 1 ----------------------------------------------------------
  logic [W-1:0] y1, y2, y3;

  adapto_lb_row #(.W(W), .NCTX(NCTX)) u_row1 (
    .clk     (clk),
    .d1      (d1),
    .d2      (d2),
    .d3      ('0),
    .ctx     (ctx),
    .line_we (line_en[B_LB1 +: L_LB]),
    .cfg_data(cfg_data),
    .y       (y1)
  );

  logic [NPIN-1:0] pins2, pins3;

  adapto_interconnect #(.NIN(NIN1), .NOUT(NPIN), .SELW(SEL1), .NCTX(NCTX)) u_ic1 (
    .clk     (clk),
    .wires   ({1'b1, 1'b0, d3, y1}),
    .ctx     (ctx),
    .line_we (line_en[B_IC1 +: L_IC1]),
    .cfg_data(cfg_data),
    .sel_out (pins2)
  );

  // ---- stripe 2 ----------------------------------------------------------
  logic [W-1:0] p2d1, p2d2, p2d3, p3d1, p3d2, p3d3;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      p2d1[i] = pins2[3*i];
      p2d2[i] = pins2[3*i+1];
      p2d3[i] = pins2[3*i+2];
      p3d1[i] = pins3[3*i];
      p3d2[i] = pins3[3*i+1];
      p3d3[i] = pins3[3*i+2];
    end
  end

  adapto_lb_row #(.W(W), .NCTX(NCTX)) u_row2 (
    .clk     (clk),
    .d1      (p2d1),
    .d2      (p2d2),
    .d3      (p2d3),
    .ctx     (ctx),
    .line_we (line_en[B_LB2 +: L_LB]),
    .cfg_data(cfg_data),
    .y       (y2)
  );

  adapto_interconnect #(.NIN(NIN2), .NOUT(NPIN), .SELW(SEL2), .NCTX(NCTX)) u_ic2 (
    .clk     (clk),
    .wires   ({1'b1, 1'b0, y2}),
    .ctx     (ctx),
    .line_we (line_en[B_IC2 +: L_IC2]),
    .cfg_data(cfg_data),
    .sel_out (pins3)
  );

  // ---- stripe 3 ----------------------------------------------------------
  adapto_lb_row #(.W(W), .NCTX(NCTX)) u_row3 (
    .clk     (clk),
    .d1      (p3d1),
    .d2      (p3d2),
    .d3      (p3d3),
    .ctx     (ctx),
    .line_we (line_en[B_LB3 +: L_LB]),
    .cfg_data(cfg_data),
    .y       (y3)
  );

  adapto_interconnect #(.NIN(NIN2), .NOUT(W), .SELW(SEL2), .NCTX(NCTX)) u_ic3 (
    .clk     (clk),
    .wires   ({1'b1, 1'b0, y3}),
    .ctx     (ctx),
    .line_we (line_en[B_IC3 +: L_IC3]),
    .cfg_data(cfg_data),
    .sel_out (dout)
  );
endmodule
