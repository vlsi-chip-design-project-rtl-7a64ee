// lvds_receiver_tb: checks that the model follows a valid differential input
// after its delay (200 ps) and holds its output while both inputs are equal.
module lvds_receiver_tb;
  logic in_p, in_n, dout;
  int checks = 0, failures = 0;

  lvds_receiver dut (.in_p, .in_n, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  logic wclk = 1'b0;
  always #5ns wclk = ~wclk;
  initial begin
    repeat (1000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    in_p = 1'b0;
    in_n = 1'b1;
    #1ns;
    check(dout == 1'b0, "low after start");
    for (int i = 0; i < 40; i++) begin
      v = 1'($urandom);
      if (v == dout) v = ~v;
      in_p = v;
      in_n = ~v;
      #100ps check(dout == ~v, "unchanged before the delay");
      #150ps check(dout == v, $sformatf("follows input %0d", i));
      // equal inputs: no valid level, output holds
      in_p = 1'b1;
      in_n = 1'b1;
      #1ns check(dout == v, "holds with equal inputs (1,1)");
      in_p = 1'b0;
      in_n = 1'b0;
      #1ns check(dout == v, "holds with equal inputs (0,0)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
