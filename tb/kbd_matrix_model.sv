// kbd_matrix_model: behavioural model of the 6 x 4 push-button Braille
// keyboard matrix (a passive switch array, no logic of its own).
//
// Columns I0..I3 are driven by the controller (col_n, one of them low);
// rows O0..O5 are pulled up and go low when a closed key connects them to a
// low column. pressed[6*c + r] = 1 closes the key in column c, row r:
// column 0 rows 0..5 = Braille dots 1..6, column 1 = F1..F6, column 2 =
// F7..F12, column 3 = ENTER, LEFT, RIGHT, SPACE, UP, DOWN.
module kbd_matrix_model (
  input  logic [3:0]  col_n,
  input  logic [23:0] pressed,
  output logic [5:0]  row_n
);
  always_comb begin
    row_n = '1;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 6; r++)
        if (pressed[6*c + r] && !col_n[c]) row_n[r] = 1'b0;
  end
endmodule
