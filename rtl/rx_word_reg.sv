// rx_word_reg: the receiver's 10-bit register.
//
// On load it takes the aligned window of the shift register and holds it for
// the 8b/10b decoder; valid pulses for one clock on the clock after the load,
// when q holds the new symbol.
// The register is the specification's.
module rx_word_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [9:0] d,
  output logic [9:0] q,
  output logic       valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) q <= d;
    end
  end
endmodule
