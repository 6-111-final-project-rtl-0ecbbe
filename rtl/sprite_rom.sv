// Sprite and digit ROM of the video output. Combinational.
//
// Sprites are 8 pixels wide and 12 rows high; the screen stores 2 bits per
// pixel (4 colours), so a sprite row is 16 bits, leftmost pixel in bits
// 15:14. Each sprite is drawn here as a 1-bit mask per row in one colour:
// paratrooper and helicopter in colour 2, bomb and explosion in 3, gun and
// bullet in 1, colour 0 being the background. The right-to-left sprites
// (codes 8, 9) and the right explosion half are the mirror images of others.
// Digits are 3 x 7 pixel glyphs in colour 1, returned as one screen byte
// (4 pixels, the fourth blank, so its low bits are always 0) per row.
// The sprite set and the 12-row height follow the original design; the
// bitmaps and colours are this design's own.
module sprite_rom
  import para_pkg::*;
(
  input  logic [7:0]  code,
  input  logic [3:0]  row,
  output logic [15:0] bits,
  input  logic [3:0]  digit,
  input  logic [2:0]  digit_row,
  output logic [7:0]  digit_bits
);
  function automatic logic [7:0] mirror(input logic [7:0] m);
    for (int i = 0; i < 8; i++) mirror[i] = m[7-i];
  endfunction

  function automatic logic [15:0] expand(input logic [7:0] m, input logic [1:0] c);
    for (int i = 0; i < 8; i++) expand[15-2*i -: 2] = m[7-i] ? c : 2'b00;
  endfunction

  function automatic logic [7:0] trooper(input logic [3:0] r);
    case (r)
      0: return 8'b00111100;  1: return 8'b01111110;  2: return 8'b11111111;
      3: return 8'b10000001;  4: return 8'b01000010;  5: return 8'b00100100;
      6: return 8'b00011000;  7: return 8'b00111100;  8: return 8'b00011000;
      9: return 8'b00111100; 10: return 8'b00100100; 11: return 8'b00100100;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] bomb(input logic [3:0] r);
    case (r)
      0: return 8'b00011000;  1: return 8'b00111100;  2: return 8'b00011000;
      3: return 8'b00111100;  4, 5, 6, 7: return 8'b01111110;
      8: return 8'b00111100;  9: return 8'b00011000;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] heli_front(input logic [3:0] r);
    case (r)
      0: return 8'b11111111;  1: return 8'b00000001;  2: return 8'b00001111;
      3: return 8'b00111111;  4: return 8'b01111111;  5: return 8'b11111111;
      6: return 8'b11111111;  7: return 8'b01111111;  8: return 8'b00111111;
      9: return 8'b00010001; 10: return 8'b01111111;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] heli_tail(input logic [3:0] r);
    case (r)
      0: return 8'b11111111;  1: return 8'b10000000;  2: return 8'b11000000;
      3: return 8'b11100001;  4: return 8'b11111111;  5: return 8'b11111111;
      6: return 8'b11100001;  7: return 8'b11000000;  8: return 8'b10000000;
      9: return 8'b00010000; 10: return 8'b11111100;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] blast(input logic [3:0] r);
    case (r)
      0: return 8'b00010000;  1: return 8'b10010010;  2: return 8'b01010100;
      3: return 8'b00111001;  4: return 8'b11111110;  5: return 8'b00111100;
      6: return 8'b01011010;  7: return 8'b10010001;  8: return 8'b00010000;
      9: return 8'b00100100;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] gun_left(input logic [3:0] r);
    case (r)
      0, 1, 2, 3: return 8'b00000001;
      4: return 8'b00000011;  5: return 8'b00000111;  6: return 8'b00001111;
      7: return 8'b00011111;  8: return 8'b00111111;  9: return 8'b01111111;
      default: return 8'b11111111;
    endcase
  endfunction

  always_comb begin
    unique case (code)
      C_TROOPER:  bits = expand(trooper(row), 2'd2);
      C_BOMB:     bits = expand(bomb(row), 2'd3);
      C_HELI1:    bits = expand(heli_front(row), 2'd2);
      C_HELI2:    bits = expand(heli_tail(row), 2'd2);
      C_EXPLODE1: bits = expand(blast(row), 2'd3);
      C_EXPLODE2: bits = expand(mirror(blast(row)), 2'd3);
      C_GUN1:     bits = expand(gun_left(row), 2'd1);
      C_GUN2:     bits = expand(mirror(gun_left(row)), 2'd1);
      C_HELI1REV: bits = expand(mirror(heli_front(row)), 2'd2);
      C_HELI2REV: bits = expand(mirror(heli_tail(row)), 2'd2);
      C_BULLET:   bits = (row == 0) ? 16'b01_00_00_00_00_00_00_00 : 16'h0000;
      default:    bits = 16'h0000;
    endcase
  end

  // 3 x 7 digit glyphs, top row in the most significant bits
  logic [20:0] glyph;
  logic [15:0] wide;
  always_comb begin
    unique case (digit)
      4'd0: glyph = 21'b111_101_101_101_101_101_111;
      4'd1: glyph = 21'b010_110_010_010_010_010_111;
      4'd2: glyph = 21'b111_001_001_111_100_100_111;
      4'd3: glyph = 21'b111_001_001_111_001_001_111;
      4'd4: glyph = 21'b101_101_101_111_001_001_001;
      4'd5: glyph = 21'b111_100_100_111_001_001_111;
      4'd6: glyph = 21'b111_100_100_111_101_101_111;
      4'd7: glyph = 21'b111_001_001_010_010_010_010;
      4'd8: glyph = 21'b111_101_101_111_101_101_111;
      4'd9: glyph = 21'b111_101_101_111_001_001_111;
      default: glyph = '0;
    endcase
    wide       = expand({glyph[20 - 3*int'(digit_row) -: 3], 5'b0}, 2'd1);
    digit_bits = (digit_row < 3'd7) ? wide[15:8] : 8'h00;
  end
endmodule
