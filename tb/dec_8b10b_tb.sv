// dec_8b10b_tb: checks the decoder on known 8b/10b symbols, on a long random
// stream of data and K28.5 symbols produced by the encoder (every word must
// come back with no error), and on invalid codes and symbols of the wrong
// disparity, which must raise code_err or disp_err.
module dec_8b10b_tb;
  import sl_pkg::*;
  logic clk = 1'b0;
  logic rst, adv;
  logic [9:0] code, enc_code;
  word_t word, enc_word;
  logic code_err, disp_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dec_8b10b dut (.clk, .rst, .adv, .code, .word, .code_err, .disp_err);
  enc_8b10b u_enc (.clk, .rst, .adv, .word(enc_word), .code(enc_code));

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

  // Decode one code; return flags and word; advance the disparity.
  task automatic dec(input logic [9:0] c, output word_t w, output logic ce, output logic de);
    code = c;
    #1 w = word;
    ce = code_err;
    de = disp_err;
    adv = 1'b1;
    @(posedge clk);
    #1 adv = 1'b0;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
  endtask

  initial begin
    word_t w;
    logic ce, de;
    rst = 1'b1;
    adv = 1'b0;
    code = '0;
    enc_word = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // known symbols, starting at RD-
    dec(10'b100111_0100, w, ce, de); check(!ce && !de && !w.k && w.data == 8'h00, "D.0.0");
    dec(10'b101010_1010, w, ce, de); check(!ce && !de && !w.k && w.data == 8'hB5, "D.21.5");
    dec(10'b001111_1010, w, ce, de); check(!ce && !de && w.k && w.data == 8'hBC, "K28.5 RD-");
    dec(10'b110000_0101, w, ce, de); check(!ce && !de && w.k && w.data == 8'hBC, "K28.5 RD+");
    dec(10'b100011_0111, w, ce, de); check(!ce && !de && w.data == 8'hF1, "D.17.7 A7");
    dec(10'b110100_1000, w, ce, de); check(!ce && !de && w.data == 8'hEB, "D.11.7 A7 RD+");
    // errors
    do_reset();
    dec(10'b1111111111, w, ce, de); check(ce, "all ones is no code");
    do_reset();
    dec(10'b000001_0101, w, ce, de); check(ce, "6b 000001 is no code");
    do_reset();
    dec(10'b011000_1011, w, ce, de); check(de && !ce, "D.0.0 RD+ form at RD-");
    do_reset();
    dec(10'b001111_1010, w, ce, de); check(!de, "first K28.5 RD-");
    dec(10'b001111_1010, w, ce, de); check(de, "second K28.5 RD- at RD+");
    dec(10'b110000_0101, w, ce, de); check(!de, "disparity resynchronised");

    // round trip through the encoder
    do_reset();
    for (int n = 0; n < 4000; n++) begin
      logic k;
      k = ($urandom % 10) == 0;
      enc_word = '{k: k, data: k ? 8'hBC : 8'($urandom)};
      #1 code = enc_code;
      #1 check(!code_err && !disp_err && word == enc_word,
               $sformatf("round trip %0d: %h -> %b -> %h", n, enc_word, enc_code, word));
      adv = 1'b1;
      @(posedge clk);
      #1 adv = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
