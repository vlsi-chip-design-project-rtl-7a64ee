// transceiver_top_tb: end-to-end test of the transceiver at its default
// parameters, with the differential output looped back to the input through
// a channel model (delay, slow delay drift, duty-ratio distortion, bit
// errors). The clock is 2 GHz, four samples per bit, i.e. 500 Mbit/s.
//  1. comma mode: the receiver must find the word boundary and pin 8 must
//     pulse for the commas; the channel delay is then set so that the phase
//     select works from a known sampling point;
//  2. data mode: every received data byte must equal the PRBS-7 sequence
//     computed here, pin 8 must pulse for each word and pin 9 stay quiet,
//     also while the channel delay drifts by two samples and most of the way back and
//     while rising edges are delayed (duty-ratio distortion);
//  3. single bit errors are injected: pin 9 must pulse, and the link must
//     recover;
//  4. back to comma mode with strongly shortened high pulses, which must
//     drive the phase select into its A = 0 case while commas are still
//     detected.
// Each mechanism is counted and must have happened at least once.
module transceiver_top_tb;
  logic clk = 1'b0;
  logic rst, mode_sel, rx_p, rx_n, tx_p, tx_n, pin_ok, pin_err;
  int checks = 0, failures = 0;

  always #250ps clk = ~clk;

  transceiver_top dut (.clk, .rst, .mode_sel, .rx_p, .rx_n, .tx_p, .tx_n, .pin_ok, .pin_err);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channel model ----------------
  int   chan_ps = 0;        // line delay
  int   rise_extra_ps = 0;  // extra delay of rising edges (duty distortion)
  bit   flip = 1'b0;        // invert the line (bit error injection)
  logic line_in;
  assign line_in = tx_p ^ flip;
  initial begin
    rx_p = 1'b0;
    rx_n = 1'b1;
  end
  // The line is sampled every 125 ps into a delay line; the receiver sees
  // the sample chan_ps old. A high level must also be rise_extra_ps older,
  // which delays rising edges only.
  localparam int STEP_PS = 125;
  logic [63:0] hist = '0;
  always #125ps begin
    logic v;
    hist = {hist[62:0], line_in};
    v = hist[chan_ps / STEP_PS] & hist[(chan_ps + rise_extra_ps) / STEP_PS];
    rx_p = v;
    rx_n = ~v;
  end

  // ---------------- reference PRBS-7 ----------------
  logic [6:0] ref_lfsr = 7'h7F;
  function automatic logic [7:0] ref_byte();
    logic [7:0] b;
    for (int i = 0; i < 8; i++) begin
      b[i] = ref_lfsr[6];
      ref_lfsr = {ref_lfsr[5:0], ref_lfsr[6] ^ ref_lfsr[5]};
    end
    return b;
  endfunction

  // ---------------- monitors ----------------
  int n_ok = 0, n_err = 0;            // pin pulses
  int n_data = 0, n_data_bad = 0;     // received data words vs reference
  int n_commas_rx = 0;
  int n_sel_change = 0, n_a0 = 0, n_align = 0, n_mode_switch = 0;
  bit expect_errors = 1'b0;           // errors are being injected
  bit in_data = 1'b0;                 // data words are compared with the reference
  logic [2:0] last_sel = 3'd3;

  always @(posedge clk) begin
    if (!rst) begin
      if (pin_ok)  n_ok++;
      if (pin_err) n_err++;
      if (dut.u_r8.valid && dut.u_r8.word_o.k) n_commas_rx++;
      if (in_data && dut.u_r8.valid && !dut.u_r8.word_o.k) begin
        logic [7:0] e;
        e = ref_byte();
        n_data++;
        if (dut.u_r8.word_o.data != e) begin
          n_data_bad++;
          if (!expect_errors)
            check(1'b0, $sformatf("data word %0d: %h expected %h", n_data, dut.u_r8.word_o.data, e));
        end
      end
      if (dut.u_ps.sel != last_sel) n_sel_change++;
      last_sel = dut.u_ps.sel;
      if (dut.u_ps.bit_valid && !dut.u_ps.a_flag) n_a0++;
      if (dut.u_cd.comma && dut.u_wc.locked && dut.u_wc.cnt != 4'd9) n_align++;
      if (dut.u_ctrl.flush) n_mode_switch++;
    end
  end

  task automatic words(input int n);
    repeat (40 * n) @(posedge clk);
  endtask

  initial begin
    int ok0, err0, d0, target;
    rst = 1'b1;
    mode_sel = 1'b0;
    repeat (10) @(posedge clk);
    rst = 1'b0;

    // 1. comma mode
    words(30);
    check(dut.u_wc.locked, "receiver locked on commas");
    check(n_ok >= 20, $sformatf("comma pulses on pin 8: %0d", n_ok));
    check(n_err == 0, "no errors in comma mode");
    // move the sampling point to clock edge 2 (transitions at edge 4)
    for (int t = 0; t < 4 && dut.u_ps.sel != 3'd2; t++) begin
      chan_ps += 500;
      words(10);
    end
    $display("channel delay %0d ps, sampling edge %0d, X=%0d Y=%0d", chan_ps, dut.u_ps.sel,
             dut.u_ps.rise_x, dut.u_ps.fall_y);
    check(dut.u_ps.sel == 3'd2, $sformatf("sampling point edge 2, got %0d", dut.u_ps.sel));
    ok0 = n_ok;
    words(10);
    check(n_ok - ok0 >= 9, "comma pulses continue after the delay change");

    // 2. data mode
    mode_sel = 1'b1;
    in_data = 1'b1;
    words(20);
    ok0 = n_ok;
    err0 = n_err;
    d0 = n_data;
    words(200);
    check(n_data - d0 >= 199 && n_data - d0 <= 201, $sformatf("one word per 40 clocks (20 ns, 500 Mbit/s): %0d in 200 words", n_data - d0));
    check(n_data - d0 >= 195, $sformatf("data words received: %0d", n_data - d0));
    check(n_ok - ok0 >= 195, $sformatf("correct pulses: %0d", n_ok - ok0));
    check(n_err == err0, "no faulty pulses on a clean link");
    // slow drift: +1000 ps in 125 ps steps (the transitions move from clock
    // edge 4 across the bit-period boundary to edge 2), then back to just
    // short of the boundary (a drift back across it slips a bit, which data
    // mode cannot repair)
    target = chan_ps + 125;
    for (int s = 0; s < 8; s++) begin
      chan_ps += 125;
      words(12);
    end
    for (int s = 0; s < 7; s++) begin
      chan_ps -= 125;
      words(12);
    end
    check(chan_ps == target, "drift returned");
    check(n_err == err0, "no errors while the phase drifts");
    check(n_sel_change >= 2, $sformatf("sampling point followed the drift (%0d changes)", n_sel_change));
    // duty-ratio distortion: rising edges 400 ps late
    rise_extra_ps = 400;
    words(60);
    check(n_err == err0, "no errors with duty-ratio distortion");
    rise_extra_ps = 0;
    words(10);

    // 3. bit errors
    expect_errors = 1'b1;
    err0 = n_err;
    for (int i = 0; i < 5; i++) begin
      @(posedge dut.u_ser.load);
      repeat (40 * 3 + 4 * (i + 2)) @(posedge clk);
      flip = 1'b1;
      #2000ps flip = 1'b0;
      words(6);
    end
    words(10);
    expect_errors = 1'b0;
    check(n_err > err0, $sformatf("error pulses on pin 9: %0d", n_err - err0));
    check(n_data_bad > 0, "received words differ where errors were injected");
    err0 = n_err;
    ok0 = n_ok;
    words(100);
    check(n_err == err0, "link recovered after bit errors");
    check(n_ok - ok0 >= 95, "correct pulses after recovery");

    // 4. comma mode with very short high pulses
    mode_sel = 1'b0;
    words(20);
    ok0 = n_ok;
    rise_extra_ps = 1100;
    words(60);
    check(n_ok - ok0 >= 30, $sformatf("commas detected with short pulses: %0d", n_ok - ok0));

    // every mechanism must have happened
    check(n_commas_rx > 0, "comma words decoded");
    check(n_align > 0, "word boundary realigned by a comma");
    check(n_mode_switch >= 2, $sformatf("mode switches %0d", n_mode_switch));
    check(n_sel_change > 0, "phase selection updated");
    check(n_a0 > 0, $sformatf("A = 0 case reached (%0d)", n_a0));
    check(n_data_bad > 0, "faulty transmission detected");
    $display("mechanisms: commas_rx=%0d ok=%0d err=%0d data=%0d bad=%0d sel_changes=%0d a0=%0d realign=%0d mode_switch=%0d",
             n_commas_rx, n_ok, n_err, n_data, n_data_bad, n_sel_change, n_a0, n_align, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
