// transceiver_top: high-speed serial link transceiver with built-in word
// error-rate test.
//
// Transmitter: a PRBS source or the K28.5 comma (chosen by mode_sel) feeds a
// word register, an 8b/10b encoder and a serializer; an LVDS driver puts the
// bit stream on tx_p/tx_n. Receiver: an LVDS receiver on rx_p/rx_n, a 4x
// oversampler and the phase select recover one bit per bit period; a shift
// register, comma detector and word counter find the symbol boundaries; the
// 10-bit register, 8b/10b decoder and 8-bit register give the received word
// and its parity (disparity/code) check. Test: every data byte sent waits in
// the transmitted-data store until the receiver delivers its byte, and the
// comparator reports a correct or a faulty word.
// Pins (of the twelve; supplies and bias are not logic): tx_p/tx_n (1,2),
// rx_p/rx_n (3,4), clk (5), pin_ok and pin_err (8,9), mode_sel (11), rst (12).
// In comma mode (mode_sel = 0) pin_ok pulses on each comma found and pin_err
// on each parity error; in data mode (mode_sel = 1) pin_ok pulses for each
// correct word and pin_err for each faulty word or parity error. Counting the
// pulses gives the word error rate.
// Timing: clk runs at four times the bit rate; one bit takes four clocks, one
// word forty. tx is looped back to rx outside the chip.
// The architecture and pins are the specification's; the single 4x clock in
// place of four clock phases, and the details listed in each block, are this
// design's choices. The LVDS driver and receiver are behavioural models.
// The phase-select state (sel, rise_x, fall_y, a_flag), the word lock flag
// and the store overflow flag are wired out of their blocks but not to pins:
// the twelve pins leave none for observation, so they are read in simulation
// only and a lint tool reports them as unused.
module transceiver_top
  import sl_pkg::*;
#(
  parameter int unsigned TXQ_DEPTH = 16,
  parameter int unsigned PRBS_LEN  = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic mode_sel,
  input  logic rx_p,
  input  logic rx_n,
  output logic tx_p,
  output logic tx_n,
  output logic pin_ok,
  output logic pin_err
);
  // control
  logic  srst;
  mode_e mode;
  logic  flush;

  // transmitter
  logic [1:0] phase;
  logic       bit_en;
  logic [7:0] prbs_byte;
  logic       prbs_adv;
  word_t      tx_word;
  logic [9:0] tx_code;
  logic       ser_load;
  logic       ser_out;

  // receiver
  logic       rx_line;
  logic [3:0] win;
  logic       win_valid;
  logic       rbit, rbit_valid;
  logic [2:0] sel, rise_x, fall_y;
  logic       a_flag;
  logic [9:0] sr;
  logic       sr_upd;
  logic       comma;
  logic       wload, locked;
  logic [9:0] rx_code;
  logic       rx_code_valid;
  word_t      dec_word;
  logic       code_err, disp_err;
  word_t      rx_word;
  logic       rx_perr, rx_valid;

  // checker
  logic [7:0] exp_byte;
  logic       exp_empty, txq_ovf;
  logic       cmp_pop, correct, faulty;

  control_logic u_ctrl (
    .clk, .rst_in(rst), .mode_in(mode_sel), .rst(srst), .mode, .flush,
    .comma, .correct, .faulty, .perr(rx_valid && rx_perr), .pin_ok, .pin_err
  );

  clock_gen u_clk (.clk, .rst(srst), .phase, .bit_en);

  prbs_gen #(.LEN(PRBS_LEN), .TAP(PRBS_LEN - 1)) u_prbs (
    .clk, .rst(srst), .adv(prbs_adv), .byte_o(prbs_byte)
  );

  tx_word_reg u_txreg (
    .clk, .rst(srst), .mode, .load(ser_load), .prbs_byte, .prbs_adv, .word(tx_word)
  );

  enc_8b10b u_enc (.clk, .rst(srst), .adv(ser_load), .word(tx_word), .code(tx_code));

  serializer u_ser (.clk, .rst(srst), .bit_en, .code(tx_code), .load(ser_load), .sout(ser_out));

  lvds_driver u_drv (.din(ser_out), .out_p(tx_p), .out_n(tx_n));

  lvds_receiver u_rcv (.in_p(rx_p), .in_n(rx_n), .dout(rx_line));

  oversampler u_os (.clk, .rst(srst), .din(rx_line), .phase, .win, .win_valid);

  phase_select u_ps (
    .clk, .rst(srst), .win, .win_valid, .bit_o(rbit), .bit_valid(rbit_valid),
    .sel, .rise_x, .fall_y, .a_flag
  );

  rx_shift_reg u_sr (.clk, .rst(srst), .bit_i(rbit), .bit_valid(rbit_valid), .sr, .upd(sr_upd));

  comma_detect u_cd (.sr, .upd(sr_upd), .comma);

  word_counter u_wc (.clk, .rst(srst), .upd(sr_upd), .comma, .load(wload), .locked);

  rx_word_reg u_r10 (.clk, .rst(srst), .load(wload), .d(sr), .q(rx_code), .valid(rx_code_valid));

  dec_8b10b u_dec (
    .clk, .rst(srst), .adv(rx_code_valid), .code(rx_code), .word(dec_word), .code_err, .disp_err
  );

  rx_data_reg u_r8 (
    .clk, .rst(srst), .load(rx_code_valid), .word_i(dec_word), .perr_i(code_err | disp_err),
    .word_o(rx_word), .perr_o(rx_perr), .valid(rx_valid)
  );

  tx_data_fifo #(.DEPTH(TXQ_DEPTH)) u_txq (
    .clk, .rst(srst), .flush, .push(ser_load && !tx_word.k), .din(tx_word.data),
    .pop(cmp_pop), .dout(exp_byte), .empty(exp_empty), .ovf(txq_ovf)
  );

  word_comparator u_cmp (
    .clk, .rst(srst), .rx_valid, .rx_word, .exp(exp_byte), .exp_empty, .pop(cmp_pop),
    .correct, .faulty
  );
endmodule
