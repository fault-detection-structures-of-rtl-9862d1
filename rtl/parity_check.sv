// parity_check: error-indication unit of one block.
//
// The actual parity of the block output is formed by an XOR tree over its W
// bits (W is 4 or 8 in the S-box structures) and compared with the parity
// predicted from the block inputs by one more XOR.  err is 1 when the two
// differ, i.e. when an odd number of the block's output bits are wrong (or
// the prediction itself is wrong).  Purely combinational.
// This unit follows the published design.
module parity_check #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] data,      // block output under test
  input  logic         pred,      // predicted parity of data
  output logic         err        // error indication flag
);
  assign err = (^data) ^ pred;
endmodule
