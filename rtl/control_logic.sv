// control_logic: reset, mode and output-pin control of the transceiver.
//
// The reset and mode-select pins are asynchronous to the clock; each passes
// two flops before use (reset is asserted for at least those two clocks).
// A change of the synchronised mode gives a one-clock flush pulse that empties
// the transmitted-data store. The chip has two result pins for four events:
//   pin_ok  = comma detected (comma mode) or correct word (data mode)
//   pin_err = parity error (both modes), or faulty word (data mode)
// Both pins are registered, one clock per event.
// The two modes, the shared pins and their events are the specification's;
// the pin assignment of parity errors, the mode encoding (0 = comma,
// 1 = data) and the synchronisers are this design's choices.
module control_logic
  import sl_pkg::*;
(
  input  logic  clk,
  input  logic  rst_in,
  input  logic  mode_in,
  output logic  rst,
  output mode_e mode,
  output logic  flush,
  input  logic  comma,
  input  logic  correct,
  input  logic  faulty,
  input  logic  perr,
  output logic  pin_ok,
  output logic  pin_err
);
  logic [1:0] rst_sync;
  logic [1:0] mode_sync;
  mode_e      mode_q;

  always_ff @(posedge clk) begin
    rst_sync  <= {rst_sync[0], rst_in};
    mode_sync <= {mode_sync[0], mode_in};
  end

  assign rst  = rst_sync[1] | rst_in;
  assign mode = mode_e'(mode_sync[1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      mode_q  <= mode;
      flush   <= 1'b0;
      pin_ok  <= 1'b0;
      pin_err <= 1'b0;
    end else begin
      mode_q  <= mode;
      flush   <= (mode != mode_q);
      if (mode == MODE_COMMA) begin
        pin_ok  <= comma;
        pin_err <= perr;
      end else begin
        pin_ok  <= correct;
        pin_err <= faulty | perr;
      end
    end
  end
endmodule
