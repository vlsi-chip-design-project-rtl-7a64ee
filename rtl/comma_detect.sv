// comma_detect: comma-sequence detector of the receiver.
//
// It compares the seven oldest bits of the shift-register window (sr[9:3])
// with the K28.5 comma patterns 0011111 and 1100000. A hit means a whole
// K28.5 symbol sits in the window with its first bit at sr[9], i.e. the word
// boundary is known. Combinational: comma is high in the clock where upd
// flags the window.
// Detecting commas for word alignment is the specification's; matching the
// 7-bit comma of K28.5 is this design's choice.
module comma_detect
  import sl_pkg::*;
(
  input  logic [9:0] sr,
  input  logic       upd,
  output logic       comma
);
  assign comma = upd && ((sr[9:3] == COMMA_RDN) || (sr[9:3] == COMMA_RDP));
endmodule
