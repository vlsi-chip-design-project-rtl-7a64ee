// control_logic_tb: checks reset and mode synchronisation (two clocks), the
// flush pulse on each mode change, and the mapping of comma, correct, faulty
// and parity-error events onto the two output pins in both modes.
module control_logic_tb;
  import sl_pkg::*;
  logic clk = 1'b0;
  logic rst_in, mode_in, rst, flush, comma, correct, faulty, perr, pin_ok, pin_err;
  mode_e mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_logic dut (.clk, .rst_in, .mode_in, .rst, .mode, .flush, .comma, .correct,
                     .faulty, .perr, .pin_ok, .pin_err);

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

  initial begin
    rst_in = 1'b1;
    mode_in = 1'b0;
    {comma, correct, faulty, perr} = '0;
    repeat (4) @(posedge clk);
    #1 rst_in = 1'b0;
    check(rst, "reset held after the pin is released");
    @(posedge clk);
    #1 check(rst, "reset held for the second clock");
    @(posedge clk);
    #1 check(!rst, "reset released after two clocks");
    check(mode == MODE_COMMA, "comma mode");
    // events in comma mode
    for (int i = 0; i < 200; i++) begin
      {comma, correct, faulty, perr} = 4'($urandom);
      @(posedge clk);
      #1 check(pin_ok == comma && pin_err == perr, "comma mode pins");
    end
    // switch to data mode
    {comma, correct, faulty, perr} = '0;
    mode_in = 1'b1;
    @(posedge clk);
    #1 check(mode == MODE_COMMA, "mode pin passes two flops");
    @(posedge clk);
    #1;
    check(mode == MODE_DATA, "data mode after two clocks");
    @(posedge clk);
    #1 check(flush, "flush on mode change");
    @(posedge clk);
    #1 check(!flush, "flush lasts one clock");
    for (int i = 0; i < 200; i++) begin
      {comma, correct, faulty, perr} = 4'($urandom);
      @(posedge clk);
      #1 check(pin_ok == correct && pin_err == (faulty | perr), "data mode pins");
    end
    mode_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(flush && mode == MODE_COMMA, "flush on the way back to comma mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
