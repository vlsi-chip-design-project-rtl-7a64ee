// phase_select_tb: feeds the phase select with 4x-oversampled random bit
// streams whose transitions sit at each of the four sampling phases, with and
// without a one-sample duty-ratio distortion, and checks
//  - the chosen clock edge against (X + Y + 4A)/2 worked out by hand for
//    each case,
//  - that after settling the recovered bits equal the sent bits,
//  - A = 0 and the pulse centre for short pulses (rising and falling edge in
//    one bit period).
module phase_select_tb;
  logic clk = 1'b0;
  logic rst, win_valid, bit_o, bit_valid, a_flag;
  logic [3:0] win;
  logic [2:0] sel, rise_x, fall_y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_select dut (.clk, .rst, .win, .win_valid, .bit_o, .bit_valid, .sel,
                    .rise_x, .fall_y, .a_flag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 200;
  logic bits [NB];
  logic samp [4*NB];
  logic rec [NB];
  int   nrec;

  always @(posedge clk) begin
    if (!rst && bit_valid) begin
      rec[nrec] <= bit_o;
      nrec <= nrec + 1;
    end
  end

  // Level seen at sample k: bit n starts at 4n + o; a new level appears
  // r (rising) or f (falling) samples late.
  function automatic logic level(int k, int o, int r, int f);
    int n, pos;
    n = (k - o) >>> 2;
    if (k - o < 0) n = -1;
    pos = (k - o) - 4 * n;
    if (n < 0) return 1'b0;
    if (f < 0 && bits[n] && pos >= 4 + f) return 1'b0;   // pulse ends early
    if (n > 0 && bits[n] != bits[n-1]) begin
      if (bits[n] && pos < r) return bits[n-1];
      if (!bits[n] && pos < f) return bits[n-1];
    end
    return bits[n];
  endfunction

  task automatic run_case(input int o, input int r, input int f, input int mode,
                          input int exp_sel, input logic exp_a, input bit check_data);
    int lag, good;
    bit found;
    rst = 1'b1;
    win_valid = 1'b0;
    nrec = 0;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NB; n++) begin
      if (mode == 0) bits[n] = 1'($urandom);
      else bits[n] = (n % 3 == 1);          // isolated ones
    end
    for (int k = 0; k < 4 * NB; k++) samp[k] = level(k, o, r, f);
    for (int m = 0; m < NB; m++) begin
      win = {samp[4*m+3], samp[4*m+2], samp[4*m+1], samp[4*m]};
      win_valid = 1'b1;
      @(posedge clk);
      #1 win_valid = 1'b0;
      repeat (3) @(posedge clk);
      #1;
    end
    check(sel == 3'(exp_sel), $sformatf("o=%0d r=%0d f=%0d: sel %0d expected %0d (X=%0d Y=%0d A=%0d)",
          o, r, f, sel, exp_sel, rise_x, fall_y, a_flag));
    check(a_flag == exp_a, $sformatf("o=%0d r=%0d f=%0d: A", o, r, f));
    if (check_data) begin
      found = 1'b0;
      for (lag = -2; lag <= 1; lag++) begin
        good = 1;
        for (int m = 20; m < NB - 2; m++)
          if (m + lag >= 0 && rec[m] != bits[m + lag]) good = 0;
        if (good) found = 1'b1;
      end
      check(found, $sformatf("o=%0d r=%0d f=%0d: recovered bits equal sent bits", o, r, f));
    end
  endtask

  initial begin
    rst = 1'b1;
    win = '0;
    win_valid = 1'b0;
    repeat (2) @(posedge clk);
    // after reset: X = Y = 1, A = 1 -> edge 3
    #1 rst = 1'b0;
    check(sel == 3'd3, "start selection edge 3");
    // transition first seen at edge o+1: X = Y = o+1, A = 1
    run_case(0, 0, 0, 0, 3, 1'b1, 1'b1);   // (1+1+4)/2 = 3
    run_case(1, 0, 0, 0, 4, 1'b1, 1'b1);   // (2+2+4)/2 = 4
    run_case(2, 0, 0, 0, 1, 1'b1, 1'b1);   // (3+3+4)/2 = 5 -> 1
    run_case(3, 0, 0, 0, 2, 1'b1, 1'b1);   // (4+4+4)/2 = 6 -> 2
    // rising edges one sample late (low duty ratio)
    run_case(0, 1, 0, 0, 3, 1'b1, 1'b1);   // (2+1+4)/2 = 3
    run_case(1, 1, 0, 0, 4, 1'b1, 1'b1);   // (3+2+4)/2 = 4
    // short isolated pulses: rise at edge 2, fall at edge 4 of the same bit
    // period (pulse of two samples), A = 0, (2+4)/2 = 3
    run_case(1, 0, -2, 1, 3, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
