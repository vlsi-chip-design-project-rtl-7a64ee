// rx_word_reg_tb: checks that the register takes the window only on load and
// that valid pulses once, on the clock after the load.
module rx_word_reg_tb;
  logic clk = 1'b0;
  logic rst, load, valid;
  logic [9:0] d, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_word_reg dut (.clk, .rst, .load, .d, .q, .valid);

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
    logic [9:0] held;
    rst = 1'b1;
    load = 1'b0;
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    held = '0;
    for (int i = 0; i < 200; i++) begin
      d = 10'($urandom);
      load = ($urandom % 3) == 0;
      if (load) held = d;
      @(posedge clk);
      #1 check(q == held, $sformatf("q %0d", i));
      check(valid == load, "valid follows load");
      load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
