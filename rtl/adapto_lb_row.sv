// adapto_lb_row: one stripe ("multicontext row") of ADAPTO logic blocks.
//
// W logic blocks sit side by side, each with its own 4-line context memory.
// A direct carry chain links LB i's carry out to LB i+1's carry input so a
// stripe can be configured as a multi-bit ripple adder; the carry into LB0
// is 0 and LB W-1's carry out is left unused (both this design's choice).
//
// Configuration: LBs are written in couples (2k, 2k+1); the even LB's memory
// takes cfg_data[NCTX-1:0], the odd one cfg_data[2*NCTX-1:NCTX]. Enable
// line_we[4*k + b] writes line b (S0, S1, S2, P for b = 0..3) of couple k.
// The data path d1/d2/d3/ctx -> y is combinational.
module adapto_lb_row
  import adapto_pkg::*;
#(
  parameter int unsigned W    = ADAPTO_W,
  parameter int unsigned NCTX = ADAPTO_NCTX
) (
  input  logic                    clk,
  input  logic [W-1:0]            d1,
  input  logic [W-1:0]            d2,
  input  logic [W-1:0]            d3,
  input  logic [$clog2(NCTX)-1:0] ctx,
  input  logic [(W/2)*LB_CFG-1:0] line_we,
  input  logic [2*NCTX-1:0]       cfg_data,
  output logic [W-1:0]            y
);
  logic [W:0] carry;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_lb
    logic [LB_CFG-1:0] cfg_bits;

    adapto_ctx_mem #(.N(LB_CFG), .NCTX(NCTX)) u_mem (
      .clk    (clk),
      .line_we(line_we[(i/2)*LB_CFG +: LB_CFG]),
      .wdata  (cfg_data[(i%2)*NCTX +: NCTX]),
      .ctx    (ctx),
      .rdata  (cfg_bits)
    );

    adapto_lb u_lb (
      .d1  (d1[i]),
      .d2  (d2[i]),
      .d3  (d3[i]),
      .co  (carry[i]),
      .cfg (lb_cfg_t'(cfg_bits)),
      .y   (y[i]),
      .cout(carry[i+1])
    );
  end
endmodule
