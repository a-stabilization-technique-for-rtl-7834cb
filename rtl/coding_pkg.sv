// coding_pkg: types and functions shared by the I/O coding transmitter and receiver.
//
// The transmitter can send SRAM words in four ways: unchanged, bus-invert coded, 8B/10B
// coded, or 8B/10B coded and then turned into line toggles. mode_e names these four modes.
//
// The 8B/10B functions implement the standard Widmer-Franaszek data characters (D.x.y):
// the low five bits EDCBA map to a 6-bit sub-block abcdei, and the high three bits HGF map
// to a 4-bit sub-block fghj. Each sub-block has a primary form, listed here for negative
// running disparity (RD-), and, where the primary form is unbalanced (or is one of the
// balanced exceptions 111000 / 1100), its complement is sent for RD+. The alternate x.A7
// form (0111 / 1000) replaces x.P7 where P7 would give a run of five equal bits across the
// sub-block boundary. A code word is {abcdei, fghj} with a in bit 9 and j in bit 0.
// The code tables follow the standard; control (K) characters are not part of this design.
package coding_pkg;

  typedef enum logic [1:0] {
    MODE_RAW          = 2'd0,  // SRAM data sent unchanged on 8 lines
    MODE_BUS_INV      = 2'd1,  // bus-invert coding, 8 data lines plus an invert line
    MODE_8B10B        = 2'd2,  // 8B/10B code word sent as line levels
    MODE_8B10B_TOGGLE = 2'd3   // 8B/10B code word, each 1 sent as a line toggle
  } mode_e;

  // Number of ones in a 10-bit word.
  function automatic logic [3:0] popcount10(input logic [9:0] v);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 10; i++) n = n + 4'(v[i]);
    return n;
  endfunction

  // Primary (RD-) 6-bit sub-block abcdei for EDCBA = x; bit 5 is a.
  function automatic logic [5:0] enc5b6b_neg(input logic [4:0] x);
    logic [5:0] c;
    case (x)
      5'd0:  c = 6'b100111;  5'd1:  c = 6'b011101;  5'd2:  c = 6'b101101;  5'd3:  c = 6'b110001;
      5'd4:  c = 6'b110101;  5'd5:  c = 6'b101001;  5'd6:  c = 6'b011001;  5'd7:  c = 6'b111000;
      5'd8:  c = 6'b111001;  5'd9:  c = 6'b100101;  5'd10: c = 6'b010101;  5'd11: c = 6'b110100;
      5'd12: c = 6'b001101;  5'd13: c = 6'b101100;  5'd14: c = 6'b011100;  5'd15: c = 6'b010111;
      5'd16: c = 6'b011011;  5'd17: c = 6'b100011;  5'd18: c = 6'b010011;  5'd19: c = 6'b110010;
      5'd20: c = 6'b001011;  5'd21: c = 6'b101010;  5'd22: c = 6'b011010;  5'd23: c = 6'b111010;
      5'd24: c = 6'b110011;  5'd25: c = 6'b100110;  5'd26: c = 6'b010110;  5'd27: c = 6'b110110;
      5'd28: c = 6'b001110;  5'd29: c = 6'b101110;  5'd30: c = 6'b011110;  default: c = 6'b101011;
    endcase
    return c;
  endfunction

  // Primary (RD-) 4-bit sub-block fghj for HGF = y (y = 7 gives P7); bit 3 is f.
  function automatic logic [3:0] enc3b4b_neg(input logic [2:0] y);
    logic [3:0] c;
    case (y)
      3'd0: c = 4'b1011;  3'd1: c = 4'b1001;  3'd2: c = 4'b0101;  3'd3: c = 4'b1100;
      3'd4: c = 4'b1101;  3'd5: c = 4'b1010;  3'd6: c = 4'b0110;  default: c = 4'b1110;
    endcase
    return c;
  endfunction

  // A primary sub-block is complemented at RD+ when it is unbalanced, and also for the
  // balanced exceptions D.7 (111000) and x.3 (1100).
  function automatic logic sb6_alternates(input logic [4:0] x);
    logic [5:0] c;
    c = enc5b6b_neg(x);
    return (popcount10({4'b0, c}) != 4'd3) || (x == 5'd7);
  endfunction

  function automatic logic sb4_alternates(input logic [2:0] y);
    logic [3:0] c;
    c = enc3b4b_neg(y);
    return (popcount10({6'b0, c}) != 4'd2) || (y == 3'd3);
  endfunction

  // Encode byte d (HGFEDCBA) at running disparity rd (1 = RD+). Returns {abcdei, fghj}.
  function automatic logic [9:0] enc8b10b(input logic [7:0] d, input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6;
    x  = d[4:0];
    y  = d[7:5];
    c6 = enc5b6b_neg(x);
    if (rd && sb6_alternates(x)) c6 = ~c6;
    // Running disparity after the 6-bit sub-block.
    rd6 = (popcount10({4'b0, c6}) == 4'd3) ? rd : (popcount10({4'b0, c6}) > 4'd3);
    if (y == 3'd7 && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                      ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)))) begin
      c4 = 4'b0111;                        // x.A7
    end else begin
      c4 = enc3b4b_neg(y);
    end
    if (rd6 && (sb4_alternates(y) || y == 3'd7)) c4 = ~c4;
    return {c6, c4};
  endfunction

  // Running disparity after sending a code word: it flips on every unbalanced word.
  function automatic logic rd_after(input logic rd, input logic [9:0] code);
    return (popcount10(code) == 4'd5) ? rd : ~rd;
  endfunction

  // Inverse table lookup: the EDCBA value whose 6-bit sub-block (either form) is c6.
  // Returns 0 for a sub-block that is not in the table; the caller checks by re-encoding.
  function automatic logic [4:0] dec6b5b(input logic [5:0] c6);
    logic [4:0] x;
    x = '0;
    for (int i = 0; i < 32; i++) begin
      if (enc5b6b_neg(5'(i)) == c6 || (sb6_alternates(5'(i)) && ~enc5b6b_neg(5'(i)) == c6))
        x = 5'(i);
    end
    return x;
  endfunction

  // Inverse table lookup: the HGF value whose 4-bit sub-block (either form, P7 or A7) is c4.
  function automatic logic [2:0] dec4b3b(input logic [3:0] c4);
    logic [2:0] y;
    y = '0;
    for (int i = 0; i < 8; i++) begin
      if (enc3b4b_neg(3'(i)) == c4 || (sb4_alternates(3'(i)) && ~enc3b4b_neg(3'(i)) == c4))
        y = 3'(i);
    end
    if (c4 == 4'b0111 || c4 == 4'b1000) y = 3'd7;
    return y;
  endfunction

endpackage
