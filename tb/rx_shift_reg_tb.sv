// rx_shift_reg_tb: shifts random bits in at irregular intervals and checks
// that the window always holds the last ten bits, oldest at bit 9, and that
// upd follows each shift by one clock.
module rx_shift_reg_tb;
  logic clk = 1'b0;
  logic rst, bit_i, bit_valid, upd;
  logic [9:0] sr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_shift_reg dut (.clk, .rst, .bit_i, .bit_valid, .sr, .upd);

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
    logic [9:0] model;
    rst = 1'b1;
    bit_i = 1'b0;
    bit_valid = 1'b0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      bit_i = 1'($urandom);
      bit_valid = 1'b1;
      model = {model[8:0], bit_i};
      @(posedge clk);
      #1 bit_valid = 1'b0;
      check(upd == 1'b1, "upd after shift");
      check(sr == model, $sformatf("window after bit %0d: %b vs %b", i, sr, model));
      repeat ($urandom % 3) begin
        @(posedge clk);
        #1 check(upd == 1'b0 && sr == model, "holds without bit_valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
