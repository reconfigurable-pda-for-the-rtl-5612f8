// kbd_scanner: Code Scanner of the Braille keyboard controller.
//
// Scans a 6 x 4 push-button matrix. A circular shift register, reset to
// 4'b0111, drives the column inputs I0..I3 (col_n[0] = I0, bit 3 of the
// register = I0), so exactly one column is low at a time; a pressed key pulls
// its row output O0..O5 low. A five-state machine runs the scan:
//   State0..State3  drive column 1..4, wait DEBOUNCE_CYCLES, then store the
//                   rows in Rn (current image) and AND them into Regn
//                   (every key pressed since the last output stays 0),
//                   rotate the register to the next column;
//   State4          if R1..R4 are all ones (every key released), send
//                   Reg1..Reg4 to the decoder as a 24-bit code with a
//                   one-cycle code_valid and set Reg1..Reg4 back to all ones;
//                   in either case return to State0.
// code[6*c + r] is row r of column c, active low. R1..R4 and Reg1..Reg4 are
// reset to all ones. The states, the register names and their update rules
// follow the document; DEBOUNCE_CYCLES = 650000 is its "about 13 ms" at the
// 50 MHz system clock. Because Regn collect every key seen during a press, a
// chord whose keys go down at different times is still read as one chord.
// code_valid is also raised when nothing was pressed (code all ones); the
// decoder ignores that code.
module kbd_scanner #(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [3:0]  col_n,      // to I0..I3
  input  logic [5:0]  row_n,      // from O0..O5
  output logic [23:0] code,
  output logic        code_valid
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4} state_t;
  state_t state;

  localparam int unsigned CW = (DEBOUNCE_CYCLES > 1) ? $clog2(DEBOUNCE_CYCLES) : 1;

  logic [3:0]       shreg;        // bit 3 drives I0
  logic [CW-1:0]    cnt;
  logic [5:0]       r   [4];
  logic [5:0]       reg_acc [4];
  logic [1:0]       col;

  assign col_n = {shreg[0], shreg[1], shreg[2], shreg[3]};
  assign col   = 2'(state);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S0;
      shreg      <= 4'b0111;
      cnt        <= '0;
      code       <= '1;
      code_valid <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        r[i]       <= '1;
        reg_acc[i] <= '1;
      end
    end else begin
      code_valid <= 1'b0;
      if (state == S4) begin
        if (r[0] == '1 && r[1] == '1 && r[2] == '1 && r[3] == '1) begin
          code       <= {reg_acc[3], reg_acc[2], reg_acc[1], reg_acc[0]};
          code_valid <= 1'b1;
          for (int i = 0; i < 4; i++) reg_acc[i] <= '1;
        end
        cnt   <= '0;
        state <= S0;
      end else if (cnt == CW'(DEBOUNCE_CYCLES - 1)) begin
        cnt          <= '0;
        r[col]       <= row_n;
        reg_acc[col] <= reg_acc[col] & row_n;
        shreg        <= {shreg[0], shreg[3:1]};
        state        <= state_t'(state + 3'd1);
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

endmodule
