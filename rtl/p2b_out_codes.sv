// p2b_out_codes: Output-Translated-Codes block of the print-to-Braille
// translator.
//
// Accepts one group of up to RESULT_MAX translated Computer Braille
// characters (grp_load, one cycle, only while grp_ready) and sends them out
// one by one on a valid/ready stream. When the last character of a group
// marked grp_last has been taken (or at once, for an empty last group) it
// pulses word_done, which tells the bus interface that the word's
// translation is complete. grp_ready is high while no group is pending.
module p2b_out_codes
  import cub_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    grp_load,
  input  char_t [RESULT_MAX-1:0]  grp_chars,
  input  logic [3:0]              grp_len,
  input  logic                    grp_last,
  output logic                    grp_ready,
  output logic                    out_valid,
  output char_t                   out_char,
  input  logic                    out_ready,
  output logic                    word_done
);

  char_t [RESULT_MAX-1:0] chars;
  logic [3:0]             len, idx;
  logic                   last, active;

  assign grp_ready = !active;
  assign out_valid = active && (idx < len);
  assign out_char  = chars[idx[2:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      chars     <= '0;
      len       <= '0;
      idx       <= '0;
      last      <= 1'b0;
      active    <= 1'b0;
      word_done <= 1'b0;
    end else begin
      word_done <= 1'b0;
      if (!active) begin
        if (grp_load) begin
          chars  <= grp_chars;
          len    <= grp_len;
          last   <= grp_last;
          idx    <= '0;
          active <= 1'b1;
        end
      end else if (idx >= len) begin
        active    <= 1'b0;
        word_done <= last;
      end else if (out_ready) begin
        idx <= idx + 4'd1;
      end
    end
  end

endmodule
