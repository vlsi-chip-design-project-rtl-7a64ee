// lvds_driver_tb: checks that the model drives out_p with the data and out_n
// with its complement, and only after its delay (200 ps).
module lvds_driver_tb;
  logic din, out_p, out_n;
  int checks = 0, failures = 0;

  lvds_driver dut (.din, .out_p, .out_n);

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
    din = 1'b0;
    #1ns din = 1'b1;
    #1ns din = 1'b0;
    #1ns;
    for (int i = 0; i < 40; i++) begin
      v = 1'($urandom);
      if (v == din) v = ~v;
      din = v;
      #100ps check(out_p == ~v && out_n == v, "output unchanged before the delay");
      #150ps check(out_p == v && out_n == ~v, $sformatf("output %0d after the delay", i));
      #2ns;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
