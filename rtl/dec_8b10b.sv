// dec_8b10b: 8b/10b decoder of the receiver, with disparity checking.
//
// The 6-bit and 4-bit sub-blocks of the code are looked up by comparing them
// with every entry of the encoder tables of sl_pkg in both disparity forms, so
// encoder and decoder share one table. A K28.5 symbol decodes to k = 1,
// data = 8'hBC. code_err flags a code that is in no table; disp_err flags a
// sub-block whose form does not fit the running disparity (for example a
// 6-bit block with four ones while the disparity is already positive). These
// two flags are the receiver's parity check of each word.
// The running disparity starts negative after reset; adv, pulsed when the
// code has been used, moves it to the value implied by the received sub-blocks,
// which also resynchronises it after an error. Outputs are combinational.
// Decoding with an 8b/10b decoder is the specification's; the error rules
// follow the standard code, and using them as the parity check is this
// design's reading of the specification.
module dec_8b10b
  import sl_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       adv,
  input  logic [9:0] code,
  output word_t      word,
  output logic       code_err,
  output logic       disp_err
);
  logic rd;          // 0: RD-, 1: RD+
  logic rd_mid, rd_next;

  logic [5:0] s6;
  logic [3:0] s4;
  logic       hit6, hit4;
  logic [4:0] x;
  logic [2:0] y;
  int         n6, n4;

  always_comb begin
    logic [5:0] c6;
    logic [3:0] c4;
    s6 = code[9:4];
    s4 = code[3:0];
    n6 = ones6(s6);
    n4 = ones4(s4);
    hit6 = 1'b0;
    hit4 = 1'b0;
    x = '0;
    y = '0;
    for (int i = 0; i < 32; i++) begin
      c6 = sb6_rdn(5'(i));
      if (s6 == c6 || (sb6_has_alt(5'(i)) && s6 == ~c6)) begin
        hit6 = 1'b1;
        x    = 5'(i);
      end
    end
    for (int j = 0; j < 16; j++) begin
      c4 = sb4_rdn(3'(j % 8), j >= 8);
      if (s4 == c4 || (sb4_has_alt(3'(j % 8)) && s4 == ~c4)) begin
        hit4 = 1'b1;
        y    = 3'(j % 8);
      end
    end

    rd_mid  = (n6 > 3) ? 1'b1 : (n6 < 3) ? 1'b0 : rd;
    rd_next = (n4 > 2) ? 1'b1 : (n4 < 2) ? 1'b0 : rd_mid;

    disp_err = ((n6 == 4 || s6 == 6'b111000) && rd) ||
               ((n6 == 2 || s6 == 6'b000111) && !rd) ||
               ((n4 == 3 || s4 == 4'b1100) && rd_mid) ||
               ((n4 == 1 || s4 == 4'b0011) && !rd_mid);

    if (code == K28_5_RDN || code == K28_5_RDP) begin
      word     = '{k: 1'b1, data: K28_5_BYTE};
      code_err = 1'b0;
    end else begin
      word     = '{k: 1'b0, data: {y, x}};
      code_err = !(hit6 && hit4);
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      rd <= 1'b0;
    else if (adv) rd <= rd_next;
  end
endmodule
