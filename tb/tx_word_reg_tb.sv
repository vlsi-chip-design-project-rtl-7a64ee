// tx_word_reg_tb: checks the word register in both modes: commas (K28.5,
// no PRBS advance) in comma mode, PRBS bytes with one advance per load in
// data mode, and that the word changes only on load.
module tx_word_reg_tb;
  import sl_pkg::*;
  logic clk = 1'b0;
  logic rst, load, prbs_adv;
  mode_e mode;
  logic [7:0] prbs_byte;
  word_t word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_word_reg dut (.clk, .rst, .mode, .load, .prbs_byte, .prbs_adv, .word);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    rst = 1'b1;
    load = 1'b0;
    mode = MODE_COMMA;
    prbs_byte = 8'h00;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(word.k == 1'b1 && word.data == 8'hBC, "comma after reset");
    for (int i = 0; i < 50; i++) begin
      b = 8'($urandom);
      prbs_byte = b;
      mode = (i < 10 || (i >= 30 && i < 35)) ? MODE_COMMA : MODE_DATA;
      #1;
      check(prbs_adv == 1'b0, "no advance without load");
      load = 1'b1;
      #1 check(prbs_adv == (mode == MODE_DATA), "advance only on data load");
      @(posedge clk);
      #1 load = 1'b0;
      if (mode == MODE_DATA)
        check(word.k == 1'b0 && word.data == b, $sformatf("data word %0d", i));
      else
        check(word.k == 1'b1 && word.data == 8'hBC, $sformatf("comma word %0d", i));
      prbs_byte = ~b;
      mode = MODE_COMMA;
      @(posedge clk);
      #1 check(word.data == ((i < 10 || (i >= 30 && i < 35)) ? 8'hBC : b), "word holds without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
