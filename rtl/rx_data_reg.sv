// rx_data_reg: the receiver's 8-bit register (received data register).
//
// On load it takes the decoded word (byte and K flag) and its parity-check
// result and holds them for the comparator and the output pins; valid pulses
// for one clock when the register holds a new word.
// The register is the specification's; storing the error flag with the byte
// is this design's choice.
module rx_data_reg
  import sl_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  word_t word_i,
  input  logic  perr_i,
  output word_t word_o,
  output logic  perr_o,
  output logic  valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      word_o <= '0;
      perr_o <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= load;
      if (load) begin
        word_o <= word_i;
        perr_o <= perr_i;
      end
    end
  end
endmodule
