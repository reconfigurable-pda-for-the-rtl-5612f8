// p2b_right_check: Right-Context-Check block of the print-to-Braille
// translator.
//
// Combinational. Compares the rule's right context (rlen characters, nearest
// to the focus first) with the text that follows the focus, i.e. starting at
// pos + flen; text outside the word reads as a space, so a right context of
// " " means "at the end of the word". An empty right context always matches.
module p2b_right_check
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
      if (i < int'(rule.rlen) &&
          text_at(int'(pos) + int'(rule.flen) + i) != rule.right[i]) match = 1'b0;
    end
  end

endmodule
