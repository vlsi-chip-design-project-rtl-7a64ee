// oversampler_tb: drives a random line value each clock and checks that every
// window holds the four values sampled at phases 0..3 of one bit period, in
// order, and that a window is presented once every four clocks.
module oversampler_tb;
  logic clk = 1'b0;
  logic rst, din, win_valid;
  logic [1:0] phase;
  logic [3:0] win;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oversampler dut (.clk, .rst, .din, .phase, .win, .win_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The testbench's own phase counter and record of what was on the line.
  logic [3:0] expq [$];
  logic [3:0] cur;
  int nwin = 0, last_win = -1, cyc = 0;

  always @(posedge clk) begin
    if (rst) begin
      phase <= 2'd0;
    end else begin
      cur[phase] = din;          // value the sampling flop takes now
      if (phase == 2'd3) expq.push_back(cur);
      phase <= phase + 2'd1;
    end
    cyc++;
  end

  always @(negedge clk) begin
    din = 1'($urandom);
    if (!rst && win_valid) begin
      check(expq.size() > 0, "window expected");
      if (expq.size() > 0) begin
        logic [3:0] e;
        e = expq.pop_front();
        check(win == e, $sformatf("window %0d: got %b expected %b", nwin, win, e));
      end
      if (last_win >= 0) check(cyc - last_win == 4, "one window per four clocks");
      last_win = cyc;
      nwin++;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (nwin == 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
