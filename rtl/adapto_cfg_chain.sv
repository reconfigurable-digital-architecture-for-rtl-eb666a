// adapto_cfg_chain: write-enable generator for the ADAPTO context memories.
//
// A chain of LEN D flip-flops connected as a shift register. A
// configuration load starts by shifting a single 1 into the head
// (start high for one cycle); the 1 then moves one flip-flop per clock.
// Flip-flop n enables line n of the current pair of context memories, so
// the configuration bus carries one 32-bit word per cycle and the whole
// array is loaded in LEN cycles (912 for the full array).
//
// Timing: with start sampled high at clock edge 0, line_en[n] is high
// between edges n and n+1, so the memories capture word n at edge n+1.
// busy is high while the 1 is in the chain; start is ignored while busy, so
// at most one load runs at a time. Reset (active low, asynchronous) empties
// the chain. Ignoring start while busy and the reset are this design's
// additions.
module adapto_cfg_chain #(
  parameter int unsigned LEN = 912
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic [LEN-1:0] line_en,
  output logic           busy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line_en <= '0;
    else        line_en <= {line_en[LEN-2:0], start & ~busy};
  end

  assign busy = |line_en;

  // Only one token may be in the chain at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(line_en))
    else $error("configuration chain holds more than one token");
endmodule
