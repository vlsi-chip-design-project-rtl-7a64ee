// word_comparator_tb: checks the correct and faulty pulses for matching,
// differing and unexpected data words, that commas are ignored, and that the
// transmitted byte is consumed exactly for compared data words.
module word_comparator_tb;
  import sl_pkg::*;
  logic clk = 1'b0;
  logic rst, rx_valid, exp_empty, pop, correct, faulty;
  word_t rx_word;
  logic [7:0] exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  word_comparator dut (.clk, .rst, .rx_valid, .rx_word, .exp, .exp_empty, .pop, .correct, .faulty);

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
    logic [7:0] b;
    int kind;
    bit e_ok, e_bad, e_pop;
    rst = 1'b1;
    rx_valid = 1'b0;
    rx_word = '0;
    exp = '0;
    exp_empty = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      kind = $urandom % 5;   // 0 match, 1 mismatch, 2 comma, 3 empty store, 4 idle
      b = 8'($urandom);
      exp = b;
      exp_empty = (kind == 3);
      rx_valid = (kind != 4);
      rx_word = '{k: kind == 2, data: (kind == 1) ? b ^ 8'(1 << ($urandom % 8)) : (kind == 2 ? 8'hBC : b)};
      e_pop = (kind == 0 || kind == 1);
      e_ok = (kind == 0);
      e_bad = (kind == 1 || kind == 3);
      #1 check(pop == e_pop, $sformatf("pop case %0d", kind));
      @(posedge clk);
      #1 rx_valid = 1'b0;
      check(correct == e_ok && faulty == e_bad, $sformatf("pulses case %0d", kind));
      @(posedge clk);
      #1 check(!correct && !faulty, "pulses last one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
