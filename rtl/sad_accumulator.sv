// sad_accumulator: accumulates line SADs into a block SAD.
//
// When en is high the register loads sad_in on the first line of a block
// (first = 1) and sad_in plus the stored value on the other lines. The result
// is valid one clock after the last line was applied and stays until the next
// enabled cycle. The load-or-add multiplexer before a single pipeline register
// follows the published accumulator diagram; the enable is this design's
// addition so that idle cycles leave the value untouched.
module sad_accumulator #(
  parameter int IW = 11,
  parameter int OW = 14
) (
  input  logic          clk,
  input  logic          en,
  input  logic          first,
  input  logic [IW-1:0] sad_in,
  output logic [OW-1:0] sad_out
);
  always_ff @(posedge clk)
    if (en) sad_out <= first ? OW'(sad_in) : sad_out + OW'(sad_in);
endmodule
