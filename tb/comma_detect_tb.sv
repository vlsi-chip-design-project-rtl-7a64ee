// comma_detect_tb: checks all 1024 window values with and without upd
// against the two comma patterns, including the two K28.5 symbols.
module comma_detect_tb;
  logic clk = 1'b0;
  logic [9:0] sr;
  logic upd, comma;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comma_detect dut (.sr, .upd, .comma);

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

  initial begin
    bit exp;
    int hits;
    hits = 0;
    for (int v = 0; v < 1024; v++) begin
      sr = 10'(v);
      exp = (v >> 3) == 7'h1F || (v >> 3) == 7'h60;   // 0011111 / 1100000
      upd = 1'b1;
      #1 check(comma == exp, $sformatf("window %b", sr));
      if (comma) hits++;
      upd = 1'b0;
      #1 check(comma == 1'b0, "no comma without upd");
    end
    check(hits == 16, "sixteen windows hold a comma");
    sr = 10'b0011111010; upd = 1'b1;
    #1 check(comma, "K28.5 RD-");
    sr = 10'b1100000101;
    #1 check(comma, "K28.5 RD+");
    sr = 10'b1001110100;
    #1 check(!comma, "D.0.0 is no comma");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
