// tb_p2b_checks: self-checking test of the Focus-, Right-Context- and
// Left-Context-Check blocks. Random words over a three-letter alphabet and
// random rules (mostly built from the word itself so that matches are
// frequent) are applied; each block's match flag is compared with a string
// comparison in which text outside the word reads as a space.
module tb_p2b_checks;
  import cub_pkg::*;
  localparam int unsigned WL = 12;
  char_t [WL-1:0] word;
  logic [4:0] word_len, pos;
  rule_t rule;
  logic focus_m, right_m, left_m;
  int checks = 0, failures = 0, hits = 0;

  p2b_focus_check #(.WORD_LEN(WL)) u_f (.word, .word_len, .pos, .rule, .match(focus_m));
  p2b_right_check #(.WORD_LEN(WL)) u_r (.word, .word_len, .pos, .rule, .match(right_m));
  p2b_left_check  #(.WORD_LEN(WL)) u_l (.word, .word_len, .pos, .rule, .match(left_m));

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic byte at(string s, int i);
    return (i < 0 || i >= s.len()) ? " " : s[i];
  endfunction
  function automatic byte pick(string s, int i);
    // usually the real text, sometimes another character
    string alt = "abc ";
    return ($urandom_range(5) == 0) ? alt[$urandom_range(3)] : at(s, i);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      string w, fs, rs, ls;
      int len, p, fl, rl, ll;
      bit ef, er, el;
      len = $urandom_range(1, WL);
      w = "";
      for (int i = 0; i < len; i++) w = {w, string'(pick("abc", $urandom_range(2)))};
      p  = $urandom_range(0, len - 1);
      fl = $urandom_range(0, FOCUS_MAX);
      rl = $urandom_range(0, CTX_MAX);
      ll = $urandom_range(0, CTX_MAX);
      rule = '0;
      rule.flen = 4'(fl); rule.rlen = 3'(rl); rule.llen = 3'(ll);
      rule.focus = '1; rule.right = '1; rule.left = '1;   // unused slots hold junk
      for (int i = 0; i < fl; i++) rule.focus[i] = pick(w, p + i);
      for (int i = 0; i < rl; i++) rule.right[i] = pick(w, p + fl + i);
      for (int i = 0; i < ll; i++) rule.left[i]  = pick(w, p - 1 - i);
      word = '{default: 8'h5A};   // beyond word_len: junk that must be ignored
      for (int i = 0; i < len; i++) word[i] = w[i];
      word_len = 5'(len); pos = 5'(p);
      ef = (fl != 0); er = 1; el = 1;
      for (int i = 0; i < fl; i++) if (rule.focus[i] != at(w, p + i)) ef = 0;
      for (int i = 0; i < rl; i++) if (rule.right[i] != at(w, p + fl + i)) er = 0;
      for (int i = 0; i < ll; i++) if (rule.left[i] != at(w, p - 1 - i)) el = 0;
      #1;
      checks += 3;
      if (focus_m !== ef) begin failures++; $display("FAIL focus '%s' pos %0d", w, p); end
      if (right_m !== er) begin failures++; $display("FAIL right '%s' pos %0d", w, p); end
      if (left_m  !== el) begin failures++; $display("FAIL left '%s' pos %0d", w, p); end
      if (ef && er && el) hits++;
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few full matches (%0d)", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
