// tx_data_fifo_tb: random pushes and pops against a queue model, then a
// burst that fills the FIFO and overflows it, then a flush.
module tx_data_fifo_tb;
  logic clk = 1'b0;
  logic rst, flush, push, pop, empty, ovf;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;

  always #5 clk = ~clk;

  tx_data_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst, .flush, .push, .din, .pop, .dout, .empty, .ovf);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [$];

  task automatic step(input logic pu, input logic po);
    push = pu;
    pop = po;
    din = 8'($urandom);
    #1;
    check(empty == (q.size() == 0), "empty flag");
    if (q.size() > 0) check(dout == q[0], $sformatf("head %h expected %h", dout, q[0]));
    if (po && q.size() > 0) void'(q.pop_front());
    if (pu && q.size() < DEPTH) q.push_back(din);
    @(posedge clk);
    #1 push = 1'b0;
    pop = 1'b0;
  endtask

  initial begin
    rst = 1'b1;
    flush = 1'b0;
    push = 1'b0;
    pop = 1'b0;
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 2000; i++) step(1'($urandom), ($urandom % 4) != 0);
    check(!ovf, "no overflow under balanced traffic");
    while (q.size() < DEPTH) step(1'b1, 1'b0);
    check(!ovf, "full is no overflow");
    step(1'b1, 1'b0);
    check(ovf, "push while full sets overflow");
    step(1'b1, 1'b1);
    check(ovf, "overflow is sticky");
    for (int i = 0; i < 5; i++) step(1'b0, 1'b1);
    flush = 1'b1;
    @(posedge clk);
    #1 flush = 1'b0;
    q.delete();
    check(empty && !ovf, "flush empties and clears overflow");
    for (int i = 0; i < 300; i++) step(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
