// upc_incrementer: the one incrementer shared by all 256 SRAM words.
//
// It takes a stored word (HIGH_W counter bits plus one even-parity bit in the MSB),
// checks its parity, adds inc (0 or 1: the carry taken from the low-order counter) and
// returns the new word with freshly computed parity. It is purely combinational. Sharing
// one incrementer across all entries follows the unit's description; the single parity
// bit per word is this design's choice, the description saying only that the array is
// widened for parity protection.
module upc_incrementer
  import upc_pkg::*;
#(
  parameter int unsigned HIGH_W = UPC_HIGH_W
) (
  input  logic [HIGH_W:0]   word_in,    // {parity, value}
  input  logic              inc,
  output logic [HIGH_W-1:0] value_out,  // value + inc
  output logic [HIGH_W:0]   word_out,   // {parity, value + inc}
  output logic              parity_err  // word_in had odd parity
);

  assign value_out  = word_in[HIGH_W-1:0] + HIGH_W'(inc);
  assign word_out   = {^value_out, value_out};
  assign parity_err = ^word_in;

endmodule
