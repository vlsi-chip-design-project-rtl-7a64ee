// tx_word_reg: the transmitter's word register between the PRBS source and
// the 8b/10b encoder.
//
// It holds the word that the serializer takes next. In comma mode that word
// is the K28.5 comma; in data mode it is the current PRBS byte. When the
// serializer takes the word (load), the register fetches the next one and, if
// it fetched a data byte, pulses prbs_adv so the PRBS source moves on. The
// mode is therefore applied word by word, never inside a word.
// The two transmit modes come from the link specification; the word-boundary
// mode switch is this design's choice.
// Timing: word changes one clock after load. After reset it holds a comma.
module tx_word_reg
  import sl_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mode_e      mode,
  input  logic       load,
  input  logic [7:0] prbs_byte,
  output logic       prbs_adv,
  output word_t      word
);
  word_t next_word;

  always_comb begin
    if (mode == MODE_DATA) next_word = '{k: 1'b0, data: prbs_byte};
    else                   next_word = '{k: 1'b1, data: K28_5_BYTE};
  end

  always_ff @(posedge clk) begin
    if (rst)       word <= '{k: 1'b1, data: K28_5_BYTE};
    else if (load) word <= next_word;
  end

  assign prbs_adv = load && (mode == MODE_DATA);
endmodule
