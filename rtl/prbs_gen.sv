// prbs_gen: pseudo-random byte source for the transmitter's data mode.
//
// A Fibonacci LFSR of LEN bits with feedback taps LEN and TAP (default PRBS-7,
// x^7 + x^6 + 1, period 127 bits). Each byte is eight successive LFSR output
// bits, first bit in byte bit 0. byte_o shows the current byte; a one-clock
// pulse on adv steps the LFSR eight times so the next byte appears on the
// following clock. Reset loads the all-ones seed.
// The specification asks only for random (PRBS) data words; the polynomial,
// the seed and the bit order are this design's choices.
module prbs_gen #(
  parameter int unsigned LEN = 7,
  parameter int unsigned TAP = 6
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       adv,
  output logic [7:0] byte_o
);
  logic [LEN-1:0] lfsr;
  logic [LEN-1:0] nxt;
  logic [7:0]     bits;

  // Run the LFSR eight steps ahead; the bits shifted out form the byte.
  always_comb begin
    nxt = lfsr;
    for (int i = 0; i < 8; i++) begin
      bits[i] = nxt[LEN-1];
      nxt     = {nxt[LEN-2:0], nxt[LEN-1] ^ nxt[TAP-1]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      lfsr <= '1;
    else if (adv) lfsr <= nxt;
  end

  assign byte_o = bits;
endmodule
