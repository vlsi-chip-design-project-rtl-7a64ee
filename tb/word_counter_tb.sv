// word_counter_tb: checks that nothing is loaded before the first comma, that
// a comma loads at once and then every tenth bit, and that a comma at a new
// bit position realigns the word boundary.
module word_counter_tb;
  logic clk = 1'b0;
  logic rst, upd, comma, load, locked;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  word_counter dut (.clk, .rst, .upd, .comma, .load, .locked);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one bit period: upd in the first of four clocks, comma as given
  task automatic bitp(input logic c, input logic exp_load);
    upd = 1'b1;
    comma = c;
    #1 check(load == exp_load, $sformatf("load %0d expected %0d", load, exp_load));
    @(posedge clk);
    #1 upd = 1'b0;
    comma = 1'b0;
    #1 check(load == 1'b0, "no load without upd");
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    int loads;
    rst = 1'b1;
    upd = 1'b0;
    comma = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 25; i++) bitp(1'b0, 1'b0);
    check(!locked, "not locked before a comma");
    bitp(1'b1, 1'b1);
    check(locked, "locked after a comma");
    for (int w = 0; w < 5; w++)
      for (int b = 1; b <= 10; b++) bitp(1'b0, b == 10);
    // comma three bits into a word: realign
    for (int b = 1; b <= 3; b++) bitp(1'b0, 1'b0);
    bitp(1'b1, 1'b1);
    for (int w = 0; w < 3; w++)
      for (int b = 1; b <= 10; b++) bitp(1'b0, b == 10);
    // comma on the boundary keeps alignment
    for (int b = 1; b <= 9; b++) bitp(1'b0, 1'b0);
    bitp(1'b1, 1'b1);
    for (int b = 1; b <= 10; b++) bitp(1'b0, b == 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
