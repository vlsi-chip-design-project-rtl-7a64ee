// enc_8b10b: 8b/10b encoder of the transmitter.
//
// code is the 10-bit symbol of the input word at the current running
// disparity (combinational). adv, pulsed when the serializer takes the code,
// moves the running disparity to the value after that symbol. Data bytes use
// the standard 5b/6b and 3b/4b tables of sl_pkg; a control word is sent as
// K28.5 whatever its byte. Running disparity starts negative after reset.
// The use of an 8b/10b code is the specification's; supporting only K28.5 as a
// control symbol is this design's choice.
module enc_8b10b
  import sl_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       adv,
  input  word_t      word,
  output logic [9:0] code
);
  logic rd;        // 0: RD-, 1: RD+
  logic rd_next;

  always_comb begin
    logic rd_d;
    rd_d = 1'b0;
    if (word.k) begin
      code    = rd ? K28_5_RDP : K28_5_RDN;
      rd_next = ~rd;                 // K28.5 is unbalanced in both forms
    end else begin
      code    = encode_data(word.data, rd, rd_d);
      rd_next = rd_d;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      rd <= 1'b0;
    else if (adv) rd <= rd_next;
  end
endmodule
