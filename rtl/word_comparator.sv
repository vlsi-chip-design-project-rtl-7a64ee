// word_comparator: compares received and transmitted data words.
//
// For each received data word (rx_valid with k = 0) it compares the byte with
// the oldest transmitted byte, pops that byte, and pulses correct when they
// match or faulty when they differ. A received data word with no transmitted
// byte waiting is faulty too. Received control symbols (commas) are not
// compared. Pulses are registered: one clock wide, on the clock after rx_valid.
// The comparison and the two result pulses are the specification's; the
// handling of commas and of an empty store is this design's choice.
module word_comparator
  import sl_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_valid,
  input  word_t      rx_word,
  input  logic [7:0] exp,
  input  logic       exp_empty,
  output logic       pop,
  output logic       correct,
  output logic       faulty
);
  logic is_data;
  assign is_data = rx_valid && !rx_word.k;
  assign pop     = is_data && !exp_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      correct <= 1'b0;
      faulty  <= 1'b0;
    end else begin
      correct <= is_data && !exp_empty && (rx_word.data == exp);
      faulty  <= is_data && (exp_empty || rx_word.data != exp);
    end
  end
endmodule
