// lvds_driver: behavioural model of the differential (LVDS) output driver.
// It is not synthesizable logic: the real part is an analog current-mode
// driver on output pins 1 and 2.
//
// The model drives out_p with the serial data and out_n with its complement,
// both DELAY_PS picoseconds after din changes. Levels, common mode and
// currents of the LVDS standard are not modelled. The driver and its pins are
// the specification's; the delay value is this model's choice.
// Because the model reacts to any change of din, a lint tool sees the
// serializer flop that drives it as used both synchronously and as an
// event; the real driver is a buffer, so this has no meaning in hardware.
module lvds_driver #(
  parameter int unsigned DELAY_PS = 200
) (
  input  logic din,
  output logic out_p,
  output logic out_n
);
  always @(din) begin
    out_p <= #(DELAY_PS * 1ps) din;
    out_n <= #(DELAY_PS * 1ps) ~din;
  end
endmodule
