// adapto_interconnect: one ADAPTO interconnect stripe.
//
// Each of the NOUT outputs (an LB input of the next stripe, or a result
// bit after the last stripe) is connected to exactly one of NIN wires. The
// choice is stored binary-coded: a SELW-bit code from the output's own
// context memory drives a decoder that closes one pass switch. Here the
// decoder plus switches are a multiplexer; a code with no wire behind it
// gives 0. Wiring shifts, constant insertion (the two constant wires) and
// bit permutations are all done by choosing codes.
//
// Configuration: decoders are written in couples (2k, 2k+1), even one from
// cfg_data[NCTX-1:0], odd one from cfg_data[2*NCTX-1:NCTX]; line_we[SELW*k+b]
// writes code bit b of couple k. The wire lists and code widths (66 wires and
// 7-bit codes after the first LB stripe, 34 and 6 after the others) follow the
// design description; which wire each code number means is set by the
// instantiating module. wires/ctx -> sel_out is combinational.
module adapto_interconnect #(
  parameter int unsigned NIN  = 66,
  parameter int unsigned NOUT = 96,
  parameter int unsigned SELW = 7,
  parameter int unsigned NCTX = 16
) (
  input  logic                    clk,
  input  logic [NIN-1:0]          wires,
  input  logic [$clog2(NCTX)-1:0] ctx,
  input  logic [(NOUT/2)*SELW-1:0] line_we,
  input  logic [2*NCTX-1:0]       cfg_data,
  output logic [NOUT-1:0]         sel_out
);
  // The code must be able to name every wire.
  initial assert (NIN <= 2**SELW) else $error("SELW too small for NIN wires");

  // Pad the wire list to 2**SELW entries so every code selects something.
  logic [2**SELW-1:0] wires_pad;
  always_comb begin
    wires_pad          = '0;
    wires_pad[NIN-1:0] = wires;
  end

  for (genvar j = 0; j < NOUT; j++) begin : g_dec
    logic [SELW-1:0] code;

    adapto_ctx_mem #(.N(SELW), .NCTX(NCTX)) u_mem (
      .clk    (clk),
      .line_we(line_we[(j/2)*SELW +: SELW]),
      .wdata  (cfg_data[(j%2)*NCTX +: NCTX]),
      .ctx    (ctx),
      .rdata  (code)
    );

    assign sel_out[j] = wires_pad[code];
  end
endmodule
