// prbs_gen_tb: compares the byte stream with a bit-serial PRBS-7 model
// (x^7 + x^6 + 1, all-ones seed, first bit in byte bit 0), checks that the
// byte holds without adv and that the sequence repeats after 127 bytes.
module prbs_gen_tb;
  logic clk = 1'b0;
  logic rst, adv;
  logic [7:0] byte_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prbs_gen dut (.clk, .rst, .adv, .byte_o);

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

  // Bit-serial reference: output bit is the register's oldest bit (stage 7).
  logic [6:0] ref_lfsr;
  function automatic logic ref_bit();
    logic b;
    b = ref_lfsr[6];
    ref_lfsr = {ref_lfsr[5:0], ref_lfsr[6] ^ ref_lfsr[5]};
    return b;
  endfunction

  initial begin
    logic [7:0] exp, first;
    rst = 1'b1;
    adv = 1'b0;
    ref_lfsr = 7'h7F;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int w = 0; w < 300; w++) begin
      for (int i = 0; i < 8; i++) exp[i] = ref_bit();
      if (w == 0) first = exp;
      check(byte_o == exp, $sformatf("byte %0d: got %02h expected %02h", w, byte_o, exp));
      if (w == 127) check(byte_o == first, "sequence repeats after 127 bytes");
      // idle clocks without adv must not change the byte
      if (w % 7 == 3) begin
        @(posedge clk);
        #1 check(byte_o == exp, "byte holds without adv");
      end
      adv = 1'b1;
      @(posedge clk);
      #1 adv = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
