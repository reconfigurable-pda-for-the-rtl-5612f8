// p2b_rules_pkg: test rule table for the print-to-Braille translator and a
// reference translator that works on strings.
//
// The table is a small English Grade 2 subset in the
// "left [FOCUS] right = result" form (results in North American Computer
// Braille): whole-word and part-word contractions for a few letters, number
// sign plus letter for digits, capital sign for two capitals, and a list for
// 'x' that never fires (so the translator must fall back to Grade 1). Letters
// without a list also fall back to Grade 1.
// build_image() lays the table out in the flash record format described in
// cub_pkg and returns the start address of each entry character's list;
// ref_translate() translates a word the same way the hardware must, in
// WORD_LEN-character pieces.
package p2b_rules_pkg;

  typedef struct {
    string left;    // nearest-first order is produced by build_image
    string focus;
    string right;
    string result;
  } rule_s;

  localparam int unsigned IMAGE_BASE = 32'h100;

  function automatic void rules(output rule_s r[$]);
    r = {};
    r.push_back('{" ", "and", " ", "&"});
    r.push_back('{"",  "and", "",  "&"});
    r.push_back('{"",  "ar",  "",  ">"});
    r.push_back('{"",  "a",   "",  "a"});
    r.push_back('{" ", "but", " ", "b"});
    r.push_back('{"",  "b",   "",  "b"});
    r.push_back('{" ", "can", " ", "c"});
    r.push_back('{"",  "ch",  "",  "*"});
    r.push_back('{"",  "c",   "",  "c"});
    r.push_back('{"",  "ed",  "",  "$"});
    r.push_back('{"",  "er",  "",  "]"});
    r.push_back('{"",  "en",  "",  "5"});
    r.push_back('{"",  "e",   "",  "e"});
    r.push_back('{"",  "for", "",  "="});
    r.push_back('{"",  "f",   "",  "f"});
    r.push_back('{"",  "ing", "",  "+"});
    r.push_back('{" ", "in",  "",  "9"});
    r.push_back('{"",  "i",   "",  "i"});
    r.push_back('{"",  "of",  "",  "("});
    r.push_back('{"",  "ou",  "",  "\\"});
    r.push_back('{"",  "ow",  "",  "["});
    r.push_back('{"",  "o",   "",  "o"});
    r.push_back('{"",  "sh",  "",  "%"});
    r.push_back('{"",  "st",  "",  "/"});
    r.push_back('{"",  "s",   "",  "s"});
    r.push_back('{" ", "the", " ", "!"});
    r.push_back('{"",  "the", "",  "!"});
    r.push_back('{"",  "th",  "",  "?"});
    r.push_back('{"",  "t",   "",  "t"});
    r.push_back('{" ", "with"," ", ")"});
    r.push_back('{"",  "wh",  "",  ":"});
    r.push_back('{"",  "w",   "",  "w"});
    r.push_back('{" ", "xx",  " ", "x"});
    r.push_back('{"",  "T",   "",  ",t"});
    r.push_back('{"",  "A",   "",  ",a"});
    r.push_back('{"",  "1",   "",  "#a"});
    r.push_back('{"",  "2",   "",  "#b"});
    r.push_back('{"",  "3",   "",  "#c"});
  endfunction

  // Flash image: rules grouped by the first focus character, in table order,
  // each group closed by an all-zero record.
  function automatic void build_image(output byte unsigned img[],
                                      output int unsigned entry_addr[128],
                                      output bit entry_valid[128]);
    rule_s r[$];
    int unsigned addr;
    rules(r);
    img = new[IMAGE_BASE + 32 * (r.size() + 40)];
    foreach (img[i]) img[i] = 0;
    foreach (entry_valid[i]) begin entry_valid[i] = 0; entry_addr[i] = 0; end
    addr = IMAGE_BASE;
    for (int c = 0; c < 128; c++) begin
      bit any = 0;
      foreach (r[k]) begin
        if (r[k].focus[0] != byte'(c)) continue;
        if (!any) begin entry_valid[c] = 1; entry_addr[c] = addr; any = 1; end
        img[addr + 0] = byte'(r[k].focus.len());
        img[addr + 1] = byte'((r[k].left.len() << 4) | r[k].right.len());
        img[addr + 2] = byte'(r[k].result.len());
        for (int i = 0; i < r[k].focus.len(); i++)  img[addr + 4 + i]  = r[k].focus[i];
        for (int i = 0; i < r[k].left.len(); i++)   img[addr + 12 + i] = r[k].left[r[k].left.len() - 1 - i];
        for (int i = 0; i < r[k].right.len(); i++)  img[addr + 16 + i] = r[k].right[i];
        for (int i = 0; i < r[k].result.len(); i++) img[addr + 20 + i] = r[k].result[i];
        addr += 32;
      end
      if (any) addr += 32;   // end-of-list record (all zero)
    end
  endfunction

  function automatic byte text_at(string w, int i);
    if (i < 0 || i >= w.len()) return " ";
    return w[i];
  endfunction

  function automatic bit fits(string w, int pos, rule_s r);
    for (int i = 0; i < r.focus.len(); i++) if (text_at(w, pos + i) != r.focus[i]) return 0;
    for (int i = 0; i < r.right.len(); i++)
      if (text_at(w, pos + r.focus.len() + i) != r.right[i]) return 0;
    // left context is written in reading order: its last character touches the focus
    for (int i = 0; i < r.left.len(); i++)
      if (text_at(w, pos - r.left.len() + i) != r.left[i]) return 0;
    return 1;
  endfunction

  function automatic string ref_piece(string w);
    rule_s r[$];
    string out = "";
    int pos = 0;
    rules(r);
    while (pos < w.len()) begin
      bit hit = 0;
      foreach (r[k]) begin
        if (r[k].focus[0] != w[pos]) continue;
        if (fits(w, pos, r[k])) begin
          out = {out, r[k].result};
          pos += r[k].focus.len();
          hit = 1;
          break;
        end
      end
      if (!hit) begin
        out = {out, w.substr(pos, pos)};
        pos++;
      end
    end
    return out;
  endfunction

  // Returns the translations of the WORD_LEN-character pieces of one word.
  function automatic void ref_translate(string w, int word_len, output string pieces[$]);
    pieces = {};
    for (int s = 0; s < w.len(); s += word_len) begin
      int e = (s + word_len < w.len()) ? s + word_len - 1 : w.len() - 1;
      pieces.push_back(ref_piece(w.substr(s, e)));
    end
  endfunction

endpackage
