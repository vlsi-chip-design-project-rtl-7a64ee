// clock_gen: sampling-phase generator of the receiver and bit timing of the
// transmitter.
//
// The link oversamples every bit at four clock phases. In this RTL the four
// phase-shifted clocks are represented by one clock running at four times the
// bit rate and a 2-bit phase counter: phase 0..3 names clock edges 1..4 of a
// bit period. bit_en is high for one clock on phase 3, the last sample of a
// bit period; the transmitter moves one bit on it.
// Four phases per bit follow the link specification; using a 4x clock with a
// counter in place of a multiphase clock generator is this design's choice.
// Timing: after reset phase is 0 in the first clock, bit_en first rises in the
// fourth clock.
module clock_gen #(
  parameter int unsigned OVERSAMPLE = sl_pkg::OVERSAMPLE
) (
  input  logic                          clk,
  input  logic                          rst,
  output logic [$clog2(OVERSAMPLE)-1:0] phase,
  output logic                          bit_en
);
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else if (phase == $clog2(OVERSAMPLE)'(OVERSAMPLE - 1)) phase <= '0;
    else phase <= phase + 1'b1;
  end

  assign bit_en = (phase == $clog2(OVERSAMPLE)'(OVERSAMPLE - 1));
endmodule
