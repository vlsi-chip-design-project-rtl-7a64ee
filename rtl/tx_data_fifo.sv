// tx_data_fifo: transmitted-data register of the error checker.
//
// Every data byte the transmitter sends is pushed here, and it stays until the
// receiver delivers the byte that went over the link, when the comparator
// pops it. A FIFO of DEPTH bytes covers the link latency of several words, so
// that each received byte meets the byte sent in its place. flush empties it
// (used on a mode switch, so that data mode starts with the first byte sent).
// A push while full is dropped and sets the sticky ovf flag until flush or
// reset. dout is the oldest byte, valid whenever empty is low.
// The transmitted-data register is the specification's; making it a FIFO,
// its depth and the overflow rule are this design's choices.
module tx_data_fifo #(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       flush,
  input  logic       push,
  input  logic [7:0] din,
  input  logic       pop,
  output logic [7:0] dout,
  output logic       empty,
  output logic       ovf
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic full, do_push, do_pop;

  assign empty   = (cnt == '0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      ovf <= 1'b0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) ovf <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) cnt <= (AW+1)'(DEPTH));
endmodule
