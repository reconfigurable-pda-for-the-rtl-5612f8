// kbd_controller: Braille keyboard controller, the Code Scanner followed by
// the Decoder.
//
// col_n/row_n go to the keyboard matrix pins (I0..I3 out, O0..O5 in).
// When all keys have been released after a press, key_code carries the
// Computer Braille character or control code of the chord and key_valid is
// high for one clock cycle. That happens at the end of the first scan that
// finds every key released, so at most two scan periods (a scan period is
// 4 x DEBOUNCE_CYCLES + 1 cycles) plus two cycles after the release.
module kbd_controller
  import cub_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [3:0]  col_n,
  input  logic [5:0]  row_n,
  output char_t       key_code,
  output logic        key_valid
);

  logic [23:0] code;
  logic        code_valid;

  kbd_scanner #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_scan (
    .clk, .rst, .col_n, .row_n, .code, .code_valid);

  kbd_decoder u_dec (
    .clk, .rst, .code, .code_valid, .out_code(key_code), .out_valid(key_valid));

endmodule
