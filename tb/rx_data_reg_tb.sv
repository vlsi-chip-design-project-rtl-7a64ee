// rx_data_reg_tb: checks that the 8-bit register takes the decoded word and
// its error flag only on load, and pulses valid on the following clock.
module rx_data_reg_tb;
  import sl_pkg::*;
  logic clk = 1'b0;
  logic rst, load, perr_i, perr_o, valid;
  word_t word_i, word_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_data_reg dut (.clk, .rst, .load, .word_i, .perr_i, .word_o, .perr_o, .valid);

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
    logic [8:0] hw;
    logic he;
    rst = 1'b1;
    load = 1'b0;
    word_i = '0;
    perr_i = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    hw = '0;
    he = 1'b0;
    for (int i = 0; i < 200; i++) begin
      word_i = word_t'(9'($urandom));
      perr_i = 1'($urandom);
      load = ($urandom % 2) == 0;
      if (load) begin
        hw = word_i;
        he = perr_i;
      end
      @(posedge clk);
      #1 check(word_o == hw && perr_o == he, $sformatf("held word %0d", i));
      check(valid == load, "valid follows load");
      load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
