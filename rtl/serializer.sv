// serializer: parallel-to-serial converter (SerDes) of the transmitter.
//
// A 10-bit shift register sends one bit per bit period, bit 9 ('a') first.
// A bit counter marks the word boundary: on the bit_en of the tenth bit the
// register loads the next code instead of shifting, and load pulses for that
// clock so that the word register, the encoder and the transmitted-data store
// advance together. sout is the register's top bit and changes only on bit_en.
// Sending 10-bit symbols serially is the specification's; the bit order and
// the way words are requested are this design's choices.
// Timing: the first code is taken on the tenth bit_en after reset (until then
// the line sends zeros).
module serializer (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_en,
  input  logic [9:0] code,
  output logic       load,
  output logic       sout
);
  logic [9:0] sr;
  logic [3:0] cnt;

  assign load = bit_en && (cnt == 4'd9);

  always_ff @(posedge clk) begin
    if (rst) begin
      sr  <= '0;
      cnt <= '0;
    end else if (bit_en) begin
      if (cnt == 4'd9) begin
        sr  <= code;
        cnt <= '0;
      end else begin
        sr  <= {sr[8:0], 1'b0};
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign sout = sr[9];
endmodule
