// p2b_focus_check: Focus-Check block of the print-to-Braille translator.
//
// Combinational. Compares the first `flen` characters of the rule's focus
// with the text starting at the current position `pos` of the word; text
// outside the word reads as a space. match is meaningful only while the rule
// is valid; a rule with focus length 0 never matches. It runs in parallel
// with the two context checks, as the document describes.
module p2b_focus_check
  import cub_pkg::*;
#(
  parameter int unsigned WORD_LEN = 12
) (
  input  char_t [WORD_LEN-1:0]  word,
  input  logic [4:0]            word_len,
  input  logic [4:0]            pos,
  input  rule_t                 rule,
  output logic                  match
);

  function automatic char_t text_at(int idx);
    if (idx < 0 || idx >= int'(word_len) || idx >= int'(WORD_LEN)) return SPACE;
    return word[idx];
  endfunction

  always_comb begin
    match = (rule.flen != 0);
    for (int i = 0; i < FOCUS_MAX; i++) begin
      if (i < int'(rule.flen) && text_at(int'(pos) + i) != rule.focus[i]) match = 1'b0;
    end
  end

endmodule
