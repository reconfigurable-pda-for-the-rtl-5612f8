// kbd_decoder: Decoder of the Braille keyboard controller.
//
// Turns the 24-bit key image from the Code Scanner (active low, bit 6*c + r
// = row r of column c) into one 8-bit code:
//   - only keys of column 1 (Braille dots 1..6 on rows O0..O5) pressed:
//     the North American Computer Braille character of that dot pattern
//     (the 64 cells map one-to-one onto ASCII 0x20..0x5F);
//   - exactly one key of columns 2..4 and no dot key: its control code,
//     F1..F6 (column 2) and F7..F12 (column 3) give 0x81..0x8C, column 4
//     gives ENTER 0x0D, LEFT 0x90, RIGHT 0x91, SPACE 0x20, UP 0x92, DOWN 0x93
//     (key positions as printed on the document's keyboard diagram);
//   - nothing pressed, or any other combination: no output.
// Registered: out_valid pulses one cycle after code_valid. The dot-to-
// character table is the standard one; the control code values and the
// treatment of mixed chords are this design's own choices.
module kbd_decoder
  import cub_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] code,
  input  logic        code_valid,
  output char_t       out_code,
  output logic        out_valid
);

  // dots[0] = dot 1 ... dots[5] = dot 6
  function automatic char_t braille_ascii(logic [5:0] d);
    unique case (d)
      6'b000000: return " ";   6'b101110: return "!";   6'b010000: return "\"";
      6'b111100: return "#";   6'b101011: return "$";   6'b101001: return "%";
      6'b101111: return "&";   6'b000100: return "'";   6'b110111: return "(";
      6'b111110: return ")";   6'b100001: return "*";   6'b101100: return "+";
      6'b100000: return ",";   6'b100100: return "-";   6'b101000: return ".";
      6'b001100: return "/";   6'b110100: return "0";   6'b000010: return "1";
      6'b000110: return "2";   6'b010010: return "3";   6'b110010: return "4";
      6'b100010: return "5";   6'b010110: return "6";   6'b110110: return "7";
      6'b100110: return "8";   6'b010100: return "9";   6'b110001: return ":";
      6'b110000: return ";";   6'b100011: return "<";   6'b111111: return "=";
      6'b011100: return ">";   6'b111001: return "?";   6'b001000: return "@";
      6'b000001: return "A";   6'b000011: return "B";   6'b001001: return "C";
      6'b011001: return "D";   6'b010001: return "E";   6'b001011: return "F";
      6'b011011: return "G";   6'b010011: return "H";   6'b001010: return "I";
      6'b011010: return "J";   6'b000101: return "K";   6'b000111: return "L";
      6'b001101: return "M";   6'b011101: return "N";   6'b010101: return "O";
      6'b001111: return "P";   6'b011111: return "Q";   6'b010111: return "R";
      6'b001110: return "S";   6'b011110: return "T";   6'b100101: return "U";
      6'b100111: return "V";   6'b111010: return "W";   6'b101101: return "X";
      6'b111101: return "Y";   6'b110101: return "Z";   6'b101010: return "[";
      6'b110011: return "\\";  6'b111011: return "]";   6'b011000: return "^";
      default:   return "_";   // 6'b111000
    endcase
  endfunction

  localparam char_t COL4 [6] = '{KEY_ENTER, KEY_LEFT, KEY_RIGHT, KEY_SPACE, KEY_UP, KEY_DOWN};

  logic [23:0] pressed;
  logic [5:0]  dots;
  logic [17:0] others;
  logic        one_other;
  char_t       other_code;

  assign pressed = ~code;
  assign dots    = pressed[5:0];
  assign others  = pressed[23:6];

  always_comb begin
    one_other  = (others != 0) && ((others & (others - 18'd1)) == 0);
    other_code = '0;
    for (int i = 0; i < 18; i++) begin
      if (others[i]) begin
        if (i < 12) other_code = KEY_F1 + char_t'(i);
        else        other_code = COL4[i - 12];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_code  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (code_valid) begin
        if (others == 0 && dots != 0) begin
          out_code  <= braille_ascii(dots);
          out_valid <= 1'b1;
        end else if (dots == 0 && one_other) begin
          out_code  <= other_code;
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
