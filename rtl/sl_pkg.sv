// sl_pkg: types, constants and 8b/10b tables shared by the serial-link
// transceiver.
//
// The link sends 8-bit words coded as 10-bit 8b/10b symbols (the standard
// IBM code). A code is held as logic [9:0] with bit 9 = 'a', the first bit on
// the wire, down to bit 0 = 'j'. The 6-bit sub-block is abcdei = code[9:4] and
// the 4-bit sub-block fghj = code[3:0]. The tables below give the RD- (running
// disparity negative) form of each sub-block; the RD+ form is its complement
// where the sub-block has two forms. The only control symbol used is K28.5,
// the comma: its first seven bits (abcdeif) are 0011111 or 1100000, a
// sequence that no data stream produces across a symbol boundary.
// The receiver oversamples each bit four times, as the link specification
// asks; the tables, the choice of K28.5 and the mode encoding are this
// design's own choices within the standard 8b/10b code.
package sl_pkg;

  localparam int unsigned OVERSAMPLE = 4;   // samples per bit

  // Operating mode selected by the mode pin.
  typedef enum logic {
    MODE_COMMA = 1'b0,   // transmit K28.5 comma symbols
    MODE_DATA  = 1'b1    // transmit PRBS data bytes
  } mode_e;

  // A word on either side of the coder: a byte and its control flag.
  typedef struct packed {
    logic       k;       // 1: control symbol (only K28.5 = 8'hBC is used)
    logic [7:0] data;
  } word_t;

  localparam logic [7:0] K28_5_BYTE   = 8'hBC;
  localparam logic [9:0] K28_5_RDN    = 10'b0011111010;   // RD- form
  localparam logic [9:0] K28_5_RDP    = 10'b1100000101;   // RD+ form
  localparam logic [6:0] COMMA_RDN    = 7'b0011111;
  localparam logic [6:0] COMMA_RDP    = 7'b1100000;

  // 5b/6b table, RD- form, indexed by EDCBA (data[4:0]).
  function automatic logic [5:0] sb6_rdn(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 6b sub-blocks that have a complemented RD+ form.
  function automatic logic sb6_has_alt(input logic [4:0] x);
    case (x)
      5'd0, 5'd1, 5'd2, 5'd4, 5'd7, 5'd8, 5'd15, 5'd16, 5'd23,
      5'd24, 5'd27, 5'd29, 5'd30, 5'd31: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // 3b/4b table, RD- form, indexed by HGF (data[7:5]); alt7 selects the
  // alternate A7 form of x.7.
  function automatic logic [3:0] sb4_rdn(input logic [2:0] y, input logic alt7);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;
      default: return alt7 ? 4'b0111 : 4'b1110;
    endcase
  endfunction

  function automatic logic sb4_has_alt(input logic [2:0] y);
    return (y == 3'd0) || (y == 3'd3) || (y == 3'd4) || (y == 3'd7);
  endfunction

  // Disparity of a sub-block: +1 more ones, -1 more zeros, 0 balanced.
  function automatic int ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction
  function automatic int ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Encode one data byte at running disparity rd (0 = RD-, 1 = RD+).
  // Returns the 10-bit code; rd_next is the running disparity after it.
  function automatic logic [9:0] encode_data(input logic [7:0] d, input logic rd,
                                              output logic rd_next);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] s6;
    logic [3:0] s4;
    logic       rd_mid;
    logic       alt7;
    x  = d[4:0];
    y  = d[7:5];
    s6 = sb6_rdn(x);
    if (rd && sb6_has_alt(x)) s6 = ~s6;
    rd_mid = (ones6(s6) == 3) ? rd : (ones6(s6) > 3);
    alt7 = (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
           ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    s4 = sb4_rdn(y, alt7);
    if (rd_mid && sb4_has_alt(y)) s4 = ~s4;
    rd_next = (ones4(s4) == 2) ? rd_mid : (ones4(s4) > 2);
    return {s6, s4};
  endfunction

endpackage
