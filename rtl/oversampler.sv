// oversampler: 4x oversampling front end of the receiver.
//
// The received line is first registered (the sampling flop, which also
// synchronises the asynchronous line to the clock) and then collected into a
// window of OVERSAMPLE samples, one per sampling phase: win[i] is the sample
// of clock edge i+1 of a bit period. When the last phase has been sampled the
// complete window is presented with a one-clock win_valid pulse; the phase
// select then picks one of its samples.
// Oversampling by four follows the specification; taking the four phases as
// four clocks of one fast clock is this design's choice.
// Timing: a line value is in the window presented two clocks after the phase
// at which it was sampled, counted from its arrival at din.
module oversampler #(
  parameter int unsigned OVERSAMPLE = sl_pkg::OVERSAMPLE
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          din,
  input  logic [$clog2(OVERSAMPLE)-1:0] phase,
  output logic [OVERSAMPLE-1:0]         win,
  output logic                          win_valid
);
  localparam int unsigned PW = $clog2(OVERSAMPLE);

  logic          samp;        // sampling flop
  logic [PW-1:0] samp_phase;  // phase at which samp was taken
  logic [OVERSAMPLE-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      samp       <= 1'b0;
      samp_phase <= '0;
      acc        <= '0;
      win        <= '0;
      win_valid  <= 1'b0;
    end else begin
      samp       <= din;
      samp_phase <= phase;
      acc[samp_phase] <= samp;
      win_valid  <= 1'b0;
      if (samp_phase == PW'(OVERSAMPLE - 1)) begin
        for (int i = 0; i < OVERSAMPLE - 1; i++) win[i] <= acc[i];
        win[OVERSAMPLE-1] <= samp;
        win_valid <= 1'b1;
      end
    end
  end
endmodule
