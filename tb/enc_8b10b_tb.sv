// enc_8b10b_tb: checks the encoder against known 8b/10b symbols and against
// the properties every valid 8b/10b stream has: each symbol has 4, 5 or 6
// ones and moves the running disparity accordingly, the disparity never
// leaves +-1, no run of equal bits is longer than five, the 256 data symbols
// at one disparity are distinct, and the comma sequence appears only inside
// K28.5.
module enc_8b10b_tb;
  import sl_pkg::*;
  logic clk = 1'b0;
  logic rst, adv;
  word_t word;
  logic [9:0] code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_8b10b dut (.clk, .rst, .adv, .word, .code);

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

  // Send one word: returns the code seen and advances the disparity.
  task automatic send(input logic k, input logic [7:0] d, output logic [9:0] c);
    word = '{k: k, data: d};
    #1 c = code;
    adv = 1'b1;
    @(posedge clk);
    #1 adv = 1'b0;
  endtask

  function automatic int popc(input logic [9:0] v);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    logic [9:0] c;
    logic [9:0] seen_n [256];
    int rd;              // -1 or +1, tracked by the testbench
    int run;
    logic lastbit;
    logic [19:0] pair;
    logic [9:0] prevc;
    rst = 1'b1;
    adv = 1'b0;
    word = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // Known symbols (abcdei fghj), starting at RD-.
    send(1'b0, 8'h00, c); check(c == 10'b100111_0100, "D.0.0 RD-");      // balanced, RD stays -
    send(1'b0, 8'h00, c); check(c == 10'b100111_0100, "D.0.0 RD- again");
    send(1'b0, 8'hB5, c); check(c == 10'b101010_1010, "D.21.5");
    send(1'b0, 8'h4A, c); check(c == 10'b010101_0101, "D.10.2");
    send(1'b1, 8'hBC, c); check(c == 10'b001111_1010, "K28.5 RD-");      // RD -> +
    send(1'b1, 8'hBC, c); check(c == 10'b110000_0101, "K28.5 RD+");      // RD -> -
    send(1'b0, 8'hF1, c); check(c == 10'b100011_0111, "D.17.7 RD- uses A7"); // RD -> +
    send(1'b0, 8'hEB, c); check(c == 10'b110100_1000, "D.11.7 RD+ uses A7"); // RD -> -
    send(1'b1, 8'hBC, c); check(c == 10'b001111_1010, "K28.5 RD- again"); // RD -> +
    send(1'b0, 8'h07, c); check(c == 10'b000111_0100, "D.7.0 RD+");
    send(1'b1, 8'hBC, c); check(c == 10'b001111_1010, "K28.5 RD- third"); // RD -> +
    send(1'b0, 8'h00, c); check(c == 10'b011000_1011, "D.0.0 RD+");

    // Distinct codes at RD-: reset, then alternate each byte with a
    // balanced symbol pair is awkward, so use reset before each byte.
    for (int b = 0; b < 256; b++) begin
      rst = 1'b1;
      @(posedge clk);
      #1 rst = 1'b0;
      send(1'b0, 8'(b), c);
      seen_n[b] = c;
      check(popc(c) >= 5, $sformatf("D byte %02h at RD- has %0d ones", b, popc(c)));
    end
    for (int a = 0; a < 256; a++)
      for (int b = a + 1; b < 256; b++)
        if (seen_n[a] == seen_n[b]) check(1'b0, $sformatf("bytes %02h %02h share a code", a, b));
    check(1'b1, "code uniqueness scanned");

    // Long random stream with commas: disparity, run length, comma position.
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    rd = -1;
    run = 0;
    lastbit = 1'b1;
    prevc = 10'b0101010101;
    for (int n = 0; n < 3000; n++) begin
      logic k;
      k = ($urandom % 16) == 0;
      send(k, k ? 8'hBC : 8'($urandom), c);
      check(popc(c) >= 4 && popc(c) <= 6, "4..6 ones");
      if (popc(c) == 6) begin check(rd == -1, "6 ones only at RD-"); rd = 1; end
      if (popc(c) == 4) begin check(rd == 1, "4 ones only at RD+"); rd = -1; end
      for (int i = 9; i >= 0; i--) begin
        if (c[i] == lastbit) run++;
        else run = 1;
        lastbit = c[i];
        if (run > 5) check(1'b0, $sformatf("run of %0d at symbol %0d", run, n));
      end
      // comma only at the start of K28.5
      pair = {prevc, c};
      for (int s = 1; s <= 13; s++) begin
        logic [6:0] w;
        w = pair[19-s -: 7];
        if (w == 7'b0011111 || w == 7'b1100000)
          check(s == 10 && k, $sformatf("comma at offset %0d in symbol %0d", s, n));
      end
      prevc = c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
