// serializer_tb: sends random codes through the serializer with bit_en every
// fourth clock and checks that the line carries each code bit 'a' first, one
// bit per bit period, and that load pulses once every ten bits (forty clocks).
module serializer_tb;
  logic clk = 1'b0;
  logic rst, bit_en, load, sout;
  logic [9:0] code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serializer dut (.clk, .rst, .bit_en, .code, .load, .sout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign bit_en = (cyc % 4) == 3;

  logic [9:0] sent [$];
  logic       line [$];
  int         load_cyc [$];
  bit         started = 1'b0;

  // Present a new random code whenever the serializer takes one.
  always @(posedge clk) begin
    if (!rst && load) begin
      sent.push_back(code);
      load_cyc.push_back(cyc);
      started <= 1'b1;
      code <= 10'($urandom);
    end
  end

  // Record the line once per bit period, just after the bit strobe.
  always @(negedge clk) begin
    if (started && cyc % 4 == 0) line.push_back(sout);
  end

  initial begin
    rst = 1'b1;
    code = 10'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (sent.size() == 31);
    for (int w = 0; w < 30; w++)
      for (int b = 9; b >= 0; b--)
        check(line[w*10 + (9-b)] == sent[w][b], $sformatf("word %0d bit %0d", w, b));
    for (int i = 1; i < 30; i++)
      check(load_cyc[i] - load_cyc[i-1] == 40, "one load per forty clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
