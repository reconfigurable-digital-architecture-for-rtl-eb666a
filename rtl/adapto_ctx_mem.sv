// adapto_ctx_mem: multicontext configuration memory of one ADAPTO element
// (one logic block or one interconnect decoder).
//
// The memory holds NCTX words of N bits, one word per context. It is
// organised and written by lines: line b holds bit b of the word for all
// NCTX contexts, and the whole line is written in one clock cycle from
// NCTX bits of the configuration bus (bus bit c is context c). Lines are
// enabled one at a time by the configuration flip-flop chain. Reading is
// combinational: the context select picks one bit of every line, so a
// context switch costs only a multiplexer delay.
//
// Interface: line_we[b] writes wdata into line b on the rising clock edge;
// rdata is the word of context ctx. Contents are not reset; they are
// undefined until loaded. The 16 x N organisation and the line-at-a-time
// write follow the design description; the mapping of bus bits to contexts
// is this design's reading of it.
module adapto_ctx_mem #(
  parameter int unsigned N    = 4,
  parameter int unsigned NCTX = 16
) (
  input  logic                    clk,
  input  logic [N-1:0]            line_we,
  input  logic [NCTX-1:0]         wdata,
  input  logic [$clog2(NCTX)-1:0] ctx,
  output logic [N-1:0]            rdata
);
  logic [NCTX-1:0] line_q [N];

  always_ff @(posedge clk) begin
    for (int b = 0; b < N; b++)
      if (line_we[b]) line_q[b] <= wdata;
  end

  always_comb begin
    for (int b = 0; b < N; b++)
      rdata[b] = line_q[b][ctx];
  end
endmodule
