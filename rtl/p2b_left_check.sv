// p2b_left_check: Left-Context-Check block of the print-to-Braille
// translator.
//
// Combinational. Compares the rule's left context (llen characters, the one
// just before the focus first) with the text before the current position,
// i.e. pos-1, pos-2, ...; text outside the word reads as a space, so a left
// context of " " means "at the start of the word". An empty left context
// always matches.
module p2b_left_check
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
    match = 1'b1;
    for (int i = 0; i < CTX_MAX; i++) begin
      if (i < int'(rule.llen) && text_at(int'(pos) - 1 - i) != rule.left[i]) match = 1'b0;
    end
  end

endmodule
