// wer_sweep_tb: word error rate against data rate, the measurement the
// transceiver exists for. The transmitter output is looped back through a
// channel that adds a random delay (timing jitter) of 0..JITTER_PS to each
// edge. For each data rate (clock = 4x bit rate) the test resets the chip,
// locks the receiver in comma mode on a clean line, switches to PRBS data
// with jitter on, and counts the pulses on pin 8 (correct word) and pin 9
// (faulty word or parity error). Independently it compares every received
// data byte with its own PRBS-7 model. Checks:
//  - at the lowest rate the jitter is small against the bit period and no
//    word may fail;
//  - at every rate, each received data word gives a pin pulse, and while the
//    word boundary holds (one word per 40 clocks) the correct-word pulses
//    equal the received bytes that match the model;
//  - the word error rate does not fall as the rate rises.
module wer_sweep_tb;
  logic clk = 1'b0;
  logic rst, mode_sel, rx_p, rx_n, tx_p, tx_n, pin_ok, pin_err;
  int checks = 0, failures = 0;
  int half_ps = 1000;
  localparam int JITTER_PS = 625;
  localparam int CHAN_PS   = 1000;
  localparam int STEP_PS   = 125;
  localparam int NWORDS    = 400;

  always #(half_ps * 1ps) clk = ~clk;

  transceiver_top dut (.clk, .rst, .mode_sel, .rx_p, .rx_n, .tx_p, .tx_n, .pin_ok, .pin_err);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channel: delay line with per-edge jitter ----------------
  bit         jitter_on = 1'b0;
  int         jit = 0;                 // current edge's extra delay, in steps
  logic       last_in = 1'b0;
  logic [63:0] hist = '0;
  always #125ps begin
    logic v;
    if (tx_p != last_in) begin
      last_in = tx_p;
      jit = jitter_on ? int'($urandom % (JITTER_PS / STEP_PS + 1)) : 0;
    end
    hist = {hist[62:0], tx_p};
    v = hist[CHAN_PS / STEP_PS + jit];
    rx_p = v;
    rx_n = ~v;
  end

  // ---------------- reference PRBS-7 ----------------
  logic [6:0] ref_lfsr;
  function automatic logic [7:0] ref_byte();
    logic [7:0] b;
    for (int i = 0; i < 8; i++) begin
      b[i] = ref_lfsr[6];
      ref_lfsr = {ref_lfsr[5:0], ref_lfsr[6] ^ ref_lfsr[5]};
    end
    return b;
  endfunction

  // ---------------- counters ----------------
  bit counting = 1'b0;
  int n_ok, n_err, n_data, n_match;
  always @(posedge clk) begin
    if (!rst && dut.u_r8.valid && !dut.u_r8.word_o.k && mode_sel) begin
      logic [7:0] e;
      e = ref_byte();
      if (counting) begin
        n_data++;
        if (dut.u_r8.word_o.data == e) n_match++;
      end
    end
    // pins are one clock behind the 8-bit register
    if (!rst && counting) begin
      if (pin_ok)  n_ok++;
      if (pin_err) n_err++;
    end
  end

  task automatic words(input int n);
    repeat (40 * n) @(posedge clk);
  endtask

  real wer [3];
  initial begin
    int rates [3] = '{125, 250, 500};
    for (int r = 0; r < 3; r++) begin
      half_ps = 1_000_000 / (rates[r] * 4) / 2;    // clock = 4 x bit rate
      jitter_on = 1'b0;
      rst = 1'b1;
      mode_sel = 1'b0;
      ref_lfsr = 7'h7F;
      repeat (10) @(posedge clk);
      rst = 1'b0;
      words(40);
      check(dut.u_wc.locked, $sformatf("%0d Mbit/s: receiver locked", rates[r]));
      mode_sel = 1'b1;
      jitter_on = 1'b1;
      words(20);
      {n_ok, n_err, n_data, n_match} = '0;
      counting = 1'b1;
      words(NWORDS);
      counting = 1'b0;
      @(posedge clk);
      wer[r] = real'(n_data - n_match) / real'(n_data);
      $display("%0d Mbit/s (clock %0d ps): words %0d, pin 8 %0d, pin 9 %0d, word error rate %0.4f",
               rates[r], 2 * half_ps, n_data, n_ok, n_err, wer[r]);
      // every received data word gives one correct or one faulty pulse
      check(n_ok <= n_data && n_ok + n_err >= n_data,
            $sformatf("%0d Mbit/s: pulses %0d + %0d cover %0d words", rates[r], n_ok, n_err, n_data));
      // while the word boundary holds, one word per 40 clocks and pin 8
      // counts exactly the words that match the model
      if (n_data == NWORDS)
        check(n_ok == n_match, $sformatf("%0d Mbit/s: pin 8 pulses %0d = matching words %0d",
              rates[r], n_ok, n_match));
      if (r == 0) check(n_err == 0 && n_match == n_data, "no word errors at 125 Mbit/s");
      else check(wer[r] >= wer[r-1], $sformatf("%0d Mbit/s: error rate not below the slower rate", rates[r]));
    end
    check(wer[2] > 0.0, "jitter of a third of a bit period causes word errors at 500 Mbit/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
