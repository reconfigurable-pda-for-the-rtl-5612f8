// p2b_translator: print-to-Braille translator.
//
// Translates ASCII text into Grade 2 Computer Braille with a rule table held
// in an external flash. Each rule has the form
//     left context [FOCUS] right context = result text
// and the rules of each entry character (the first character of the focus)
// are stored one after another. For every untranslated position of a word
// the rules of that position's character are tried in order; the first rule
// whose focus, right context and left context all match the text "fires":
// its result text is emitted and the position moves past the focus.
//
// Nine blocks, wired as in the document's block diagram:
//   p2b_ctrl         Translating-Controller: word registers, entry character
//   p2b_find_entry   Find-Entry: start address of each character's rules
//   p2b_output_rule  Output-Rule: rule-by-rule walk of the list
//   p2b_flash_if     Interface: reads one rule record from the flash
//   p2b_focus_check / p2b_right_check / p2b_left_check: the three parallel
//                    comparisons
//   p2b_load_codes   Load-Translated-Codes: fire / next rule / Grade 1
//   p2b_out_codes    Output-Translated-Codes: emits the result one character
//                    at a time
//
// Interface: text enters on in_valid/in_char/in_ready (a space ends a word);
// Braille leaves on out_valid/out_char/out_ready, and word_done pulses after
// a word's last character. The flash pins and the Find-Entry load port are
// brought out. A character with no rules is passed through unchanged
// (Grade 1). Timing: about 2 cycles per rule tried plus 16*WAIT_CYCLES for
// each rule record read.
module p2b_translator
  import cub_pkg::*;
#(
  parameter int unsigned WORD_LEN         = 12,
  parameter int unsigned FLASH_WAIT_CYCLES = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  // text in
  input  logic                 in_valid,
  input  char_t                in_char,
  output logic                 in_ready,
  // Braille out
  output logic                 out_valid,
  output char_t                out_char,
  input  logic                 out_ready,
  output logic                 word_done,
  output logic                 busy,
  // rule-table flash
  output logic [FLASH_AW-1:0]  flash_addr,
  output logic                 flash_ce_n,
  output logic                 flash_oe_n,
  input  logic [FLASH_DW-1:0]  flash_dq,
  // Find-Entry table load port
  input  logic                 entry_we,
  input  logic [6:0]           entry_wchar,
  input  logic [FLASH_AW-1:0]  entry_waddr,
  input  logic                 entry_wvalid,
  // statistics
  output logic [15:0]          n_rules_read,
  output logic [15:0]          n_match,
  output logic [15:0]          n_grade1,
  output logic [15:0]          n_next
);

  char_t [WORD_LEN-1:0] word;
  logic [4:0]           word_len, pos, remaining;
  logic                 entry_req;
  char_t                entry_char;
  logic                 step_done;
  logic [3:0]           step_count;

  logic                 fe_valid, fe_found;
  logic [FLASH_AW-1:0]  fe_addr;

  logic                 fetch_req, fetch_done;
  logic [FLASH_AW-1:0]  fetch_addr;
  rule_t                fetch_rule;

  logic                 rule_valid;
  rule_t                rule;
  logic                 next, accept;
  logic                 focus_ok, right_ok, left_ok;

  logic                   grp_ready, grp_load, grp_last;
  char_t [RESULT_MAX-1:0] grp_chars;
  logic [3:0]             grp_len;

  p2b_ctrl #(.WORD_LEN(WORD_LEN)) u_ctrl (
    .clk, .rst,
    .in_valid, .in_char, .in_ready,
    .entry_req, .entry_char,
    .step_done, .step_count,
    .word, .word_len, .pos, .remaining, .busy
  );

  p2b_find_entry u_find (
    .clk, .rst,
    .we(entry_we), .wchar(entry_wchar), .waddr(entry_waddr), .wvalid(entry_wvalid),
    .req(entry_req), .req_char(entry_char),
    .resp_valid(fe_valid), .resp_found(fe_found), .resp_addr(fe_addr)
  );

  p2b_output_rule u_rule (
    .clk, .rst,
    .entry_valid(fe_valid), .entry_found(fe_found), .entry_addr(fe_addr),
    .fetch_req, .fetch_addr, .fetch_done, .fetch_rule,
    .rule_valid, .rule,
    .next, .accept,
    .rules_read(n_rules_read)
  );

  p2b_flash_if #(.WAIT_CYCLES(FLASH_WAIT_CYCLES)) u_if (
    .clk, .rst,
    .fetch_req, .fetch_addr, .fetch_done, .fetch_rule,
    .flash_addr, .flash_ce_n, .flash_oe_n, .flash_dq
  );

  p2b_focus_check #(.WORD_LEN(WORD_LEN)) u_focus (
    .word, .word_len, .pos, .rule, .match(focus_ok)
  );

  p2b_right_check #(.WORD_LEN(WORD_LEN)) u_right (
    .word, .word_len, .pos, .rule, .match(right_ok)
  );

  p2b_left_check #(.WORD_LEN(WORD_LEN)) u_left (
    .word, .word_len, .pos, .rule, .match(left_ok)
  );

  p2b_load_codes u_load (
    .clk, .rst,
    .rule_valid, .rule, .focus_ok, .right_ok, .left_ok,
    .entry_char, .remaining,
    .next, .accept,
    .grp_ready, .grp_load, .grp_chars, .grp_len, .grp_last,
    .step_done, .step_count,
    .n_match, .n_grade1, .n_next
  );

  p2b_out_codes u_out (
    .clk, .rst,
    .grp_load, .grp_chars, .grp_len, .grp_last, .grp_ready,
    .out_valid, .out_char, .out_ready,
    .word_done
  );

endmodule
