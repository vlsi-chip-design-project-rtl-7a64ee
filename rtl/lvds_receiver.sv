// lvds_receiver: behavioural model of the differential (LVDS) input receiver.
// It is not synthesizable logic: the real part is an analog comparator on
// input pins 3 and 4.
//
// dout follows in_p, DELAY_PS picoseconds later, whenever the two inputs
// differ (a valid differential level); when they are equal, as on an open or
// shorted pair, dout holds its last value. The receiver and its pins are the
// specification's; the hold behaviour and the delay are this model's choices.
// Because dout keeps its value while the inputs are equal, a synthesis tool
// reads it as a one-bit latch; that is the intended model of the comparator's
// memory, and the model is not meant to be turned into gates.
module lvds_receiver #(
  parameter int unsigned DELAY_PS = 200
) (
  input  logic in_p,
  input  logic in_n,
  output logic dout
);
  initial dout = 1'b0;
  always @(in_p or in_n) begin
    if (in_p != in_n) dout <= #(DELAY_PS * 1ps) in_p;
  end
endmodule
