// word_counter: word-boundary counter of the receiver.
//
// It counts the bits shifted into the receive shift register. A comma marks
// the window as a complete, aligned symbol: load pulses and the count starts
// again, so that every tenth bit after it load pulses once more and the
// 10-bit register takes the next symbol. A comma found at a different bit
// position realigns the count. Before the first comma nothing is loaded;
// locked tells that a comma has been seen since reset.
// The counter and its use with comma detection are the specification's;
// withholding words before the first comma is this design's choice.
// Timing: load is combinational, in the clock of upd.
module word_counter (
  input  logic clk,
  input  logic rst,
  input  logic upd,
  input  logic comma,
  output logic load,
  output logic locked
);
  logic [3:0] cnt;   // bits since the last word boundary

  assign load = upd && (comma || (locked && cnt == 4'd9));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      locked <= 1'b0;
    end else if (upd) begin
      if (comma) locked <= 1'b1;
      if (load)  cnt <= '0;
      else if (cnt != 4'd9) cnt <= cnt + 1'b1;
    end
  end
endmodule
