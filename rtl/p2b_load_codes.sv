// p2b_load_codes: Load-Translated-Codes block of the print-to-Braille
// translator.
//
// Watches the rule presented by Output-Rule together with the three match
// flags. If the rule is empty (focus length 0: no rule list for the entry
// character, or the list is exhausted) the entry character itself is passed
// on as a one-character Grade 1 group and one character is reported as
// translated. If focus, right context and left context all match, the rule's
// result text is loaded into Output-Translated-Codes and the focus length is
// reported as the number of characters translated. Otherwise a `next` pulse
// asks Output-Rule for the following rule. A group is loaded only when
// Output-Translated-Codes is idle (grp_ready), so groups leave in order.
//
// Decisions are registered: next/accept/grp_load/step_done are one-cycle
// pulses one clock after the decision, and the block then waits one cycle
// for Output-Rule to withdraw the rule. grp_last tells Output-Translated-Codes
// that this group ends the word. The Grade 1 pass-through of a character
// without rules follows the document; using it also when the rule list is
// exhausted is this design's own choice.
module p2b_load_codes
  import cub_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           rule_valid,
  input  rule_t                          rule,
  input  logic                           focus_ok,
  input  logic                           right_ok,
  input  logic                           left_ok,
  input  char_t                          entry_char,
  input  logic [4:0]                     remaining,
  // to Output-Rule
  output logic                           next,
  output logic                           accept,
  // to Output-Translated-Codes
  input  logic                           grp_ready,
  output logic                           grp_load,
  output char_t [RESULT_MAX-1:0]         grp_chars,
  output logic [3:0]                     grp_len,
  output logic                           grp_last,
  // to Translating-Controller
  output logic                           step_done,
  output logic [3:0]                     step_count,
  // statistics
  output logic [15:0]                    n_match,
  output logic [15:0]                    n_grade1,
  output logic [15:0]                    n_next
);

  logic hold;
  logic matched, empty;

  assign empty   = (rule.flen == 0);
  assign matched = focus_ok && right_ok && left_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold       <= 1'b0;
      next       <= 1'b0;
      accept     <= 1'b0;
      grp_load   <= 1'b0;
      grp_chars  <= '0;
      grp_len    <= '0;
      grp_last   <= 1'b0;
      step_done  <= 1'b0;
      step_count <= '0;
      n_match    <= '0;
      n_grade1   <= '0;
      n_next     <= '0;
    end else begin
      next      <= 1'b0;
      accept    <= 1'b0;
      grp_load  <= 1'b0;
      step_done <= 1'b0;
      hold      <= 1'b0;
      if (rule_valid && !hold && !next && !accept) begin
        if (empty) begin
          if (grp_ready) begin
            grp_chars    <= '0;
            grp_chars[0] <= entry_char;
            grp_len      <= 4'd1;
            grp_last     <= (remaining <= 5'd1);
            grp_load     <= 1'b1;
            step_count   <= 4'd1;
            step_done    <= 1'b1;
            accept       <= 1'b1;
            hold         <= 1'b1;
            n_grade1     <= n_grade1 + 16'd1;
          end
        end else if (matched) begin
          if (grp_ready) begin
            grp_chars  <= rule.result;
            grp_len    <= rule.reslen;
            grp_last   <= ({1'b0, rule.flen} >= remaining);
            grp_load   <= 1'b1;
            step_count <= rule.flen;
            step_done  <= 1'b1;
            accept     <= 1'b1;
            hold       <= 1'b1;
            n_match    <= n_match + 16'd1;
          end
        end else begin
          next   <= 1'b1;
          hold   <= 1'b1;
          n_next <= n_next + 16'd1;
        end
      end
    end
  end

endmodule
