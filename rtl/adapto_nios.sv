// adapto_nios: the ADAPTO unit behind a two-operand custom-instruction port,
// with a state register that supplies the third operand.
//
// A processor custom instruction delivers two source registers (dataa,
// datab) and takes back one result, while the array has three operands.
// The third one comes from a 32-bit state register: one instruction writes
// it, and the following instructions use it as D3 for as long as it is not
// rewritten. Operand routing:
//   dataa (input 1) -> D2
//   datab (input 2) -> D1, and into the state register
//   state register  -> D3
//   dout            -> result
//
// Instruction field n (8 bits):
//   n[7] = 0  execute: ctx = n[3:0]; result = array output for
//             (D1, D2, D3) = (datab, dataa, state register)
//   n[7] = 1  load D3: the state register takes datab at the rising clock
//             edge where start and clk_en are both high; result = the
//             value the register held before
// n[6:4] are ignored. Both kinds of instruction complete in the cycle they
// are issued: result is combinational, the register write lands on the
// clock edge that ends the instruction, so an execute issued in the next
// cycle already sees the new D3. The state register clears on reset
// (rst_n low, asynchronous). The configuration port of the array is
// brought out unchanged (cfg_start, cfg_data, cfg_busy).
//
// Following the integration described for the unit: the state register on
// the datab path feeding D3, datab feeding D1, dataa feeding D2, and one
// extra operation to load the third operand before a three-input function.
// This design's own choices: the encoding of n (execute versus load, the
// context number in n[3:0]), loading only when start and clk_en are high,
// the value returned by a load, and the reset of the register.
module adapto_nios
  import adapto_pkg::*;
#(
  parameter int unsigned W    = ADAPTO_W,
  parameter int unsigned NCTX = ADAPTO_NCTX
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration port of the array
  input  logic              cfg_start,
  input  logic [2*NCTX-1:0] cfg_data,
  output logic              cfg_busy,
  // custom-instruction port
  input  logic              clk_en,
  input  logic              start,
  input  logic [7:0]        n,
  input  logic [W-1:0]      dataa,
  input  logic [W-1:0]      datab,
  output logic [W-1:0]      result
);

  localparam int unsigned CW = $clog2(NCTX);

  logic [W-1:0] d3_q;
  logic [W-1:0] dout;
  logic         is_load;

  assign is_load = n[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            d3_q <= '0;
    else if (clk_en && start && is_load)   d3_q <= datab;
  end

  adapto #(.W(W), .NCTX(NCTX)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_start(cfg_start),
    .cfg_data (cfg_data),
    .cfg_busy (cfg_busy),
    .ctx      (n[CW-1:0]),
    .d1       (datab),
    .d2       (dataa),
    .d3       (d3_q),
    .dout     (dout)
  );

  assign result = is_load ? d3_q : dout;

endmodule
