// phase_select: clock-phase (sampling point) selection of the receiver.
//
// For every window of four samples (clock edges 1..4 of a bit period) the
// block looks for a rising edge and a falling edge of the data, comparing each
// sample with the one before it (the first with the last sample of the
// previous window). X is the edge number that first sees the new high level,
// Y the one that first sees the new low level. A is 1 while rising and falling
// edges never fall in the same window, and 0 once a window holds a rising
// edge followed by a falling edge (a pulse shorter than a bit, caused by a
// very low or high duty ratio). The sampling point is
//     ideal = (X + Y + 4A) / 2          (truncated, taken modulo 4 into 1..4)
// which is the middle of a high pulse: Y is counted in the next bit period
// when A = 1. The choice is recomputed every bit period from the latest edges
// so it follows slow phase drift, skew and duty-ratio changes.
// The formula and the meaning of X, Y and A follow the specification's phase
// select description; the rule that updates A, the rounding, the start value
// (X = Y = 1, A = 1, edge 3) and the first-edge choice in a noisy window are
// this design's.
// Limitation: the formula does not know which bit period an edge belongs to.
// If the edges drift backward across the boundary between edge 4 and edge 1
// (or jitter throws them across it), X and Y briefly disagree, the selection
// wraps, and one bit is lost or repeated. Nothing here corrects that; the
// next comma restores the word boundary.
// Output: one recovered bit per window; bit_o and bit_valid appear on the
// clock after win_valid and use the selection made from earlier windows.
// sel, rise_x, fall_y and a_flag show the state for observation.
module phase_select (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] win,
  input  logic       win_valid,
  output logic       bit_o,
  output logic       bit_valid,
  output logic [2:0] sel,
  output logic [2:0] rise_x,
  output logic [2:0] fall_y,
  output logic       a_flag
);
  logic       prev;           // last sample of the previous window
  logic [3:0] prior;         // sample preceding each sample of the window
  logic [3:0] rise, fall;     // edge seen at clock edge i+1
  logic       has_r, has_f;
  logic [2:0] xr, yf;         // first rising / falling edge numbers (1..4)
  logic       same_cycle;     // rising edge followed by falling edge here
  logic       fall_alone;     // falling edge without a rising edge before it

  always_comb begin
    prior = {win[2:0], prev};
    rise   = win & ~prior;
    fall   = ~win & prior;
    has_r  = |rise;
    has_f  = |fall;
    xr = 3'd1;
    yf = 3'd1;
    for (int i = 3; i >= 0; i--) begin
      if (rise[i]) xr = 3'(i + 1);
      if (fall[i]) yf = 3'(i + 1);
    end
    same_cycle = has_r && has_f && (yf > xr);
    fall_alone = has_f && !(has_r && xr < yf);
  end

  // Ideal clock edge from the registered X, Y, A.
  logic [3:0] sum;
  logic [2:0] half;
  logic [2:0] ideal;
  always_comb begin
    sum  = 4'(rise_x) + 4'(fall_y) + (a_flag ? 4'd4 : 4'd0);
    half = 3'(sum >> 1);
    ideal = (half > 3'd4) ? half - 3'd4 : half;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= 1'b0;
      rise_x    <= 3'd1;
      fall_y    <= 3'd1;
      a_flag    <= 1'b1;
      sel       <= 3'd3;
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= win_valid;
      if (win_valid) begin
        prev  <= win[3];
        bit_o <= win[2'(sel - 3'd1)];
        sel   <= ideal;
        if (has_r) rise_x <= xr;
        if (has_f) fall_y <= yf;
        if (same_cycle)      a_flag <= 1'b0;
        else if (fall_alone) a_flag <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) sel >= 3'd1 && sel <= 3'd4);
endmodule
