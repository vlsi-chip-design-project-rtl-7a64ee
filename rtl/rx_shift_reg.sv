// rx_shift_reg: serial-to-parallel shift register (receiver SerDes).
//
// Each recovered bit is shifted in at bit 0, so sr always holds the last ten
// bits with the oldest at bit 9. When the word boundary is right, sr[9] is the
// 'a' bit of a symbol and sr reads like a transmitter code. upd pulses on the
// clock after each shift, when sr holds the new window; the comma detector and
// the word counter act on it.
// The shift register is the specification's; its width of one symbol is this
// design's choice.
module rx_shift_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_i,
  input  logic       bit_valid,
  output logic [9:0] sr,
  output logic       upd
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sr  <= '0;
      upd <= 1'b0;
    end else begin
      upd <= bit_valid;
      if (bit_valid) sr <= {sr[8:0], bit_i};
    end
  end
endmodule
