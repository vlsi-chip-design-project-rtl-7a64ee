// clock_gen_tb: checks that the phase counter runs 0,1,2,3 and that bit_en
// marks exactly phase 3, once every four clocks, starting from reset.
module clock_gen_tb;
  logic clk = 1'b0;
  logic rst;
  logic [1:0] phase;
  logic bit_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_gen dut (.clk, .rst, .phase, .bit_en);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_en;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n_en = 0;
    for (int i = 0; i < 40; i++) begin
      check(phase == 2'(i % 4), $sformatf("phase at clock %0d is %0d", i, phase));
      check(bit_en == (i % 4 == 3), $sformatf("bit_en at clock %0d", i));
      if (bit_en) n_en++;
      @(posedge clk);
      #1;
    end
    check(n_en == 10, "ten bit strobes in forty clocks");
    // reset in the middle restarts the count
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    check(phase == 2'd0 && !bit_en, "phase 0 after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
