// tb_p2b_load_codes: self-checking test of Load-Translated-Codes. Presents
// rules with chosen match flags, as Output-Rule would (the rule is withdrawn
// one cycle after next/accept), and checks: a mismatch gives exactly one
// `next`; a match loads the result group, reports the focus length and
// sets "last" when the focus reaches the end of the word; an empty rule
// passes the entry character through as a one-character group; nothing is
// loaded while Output-Translated-Codes is busy; and the statistics counters.
module tb_p2b_load_codes;
  import cub_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic rule_valid = 0, focus_ok = 0, right_ok = 0, left_ok = 0, grp_ready = 1;
  rule_t rule = '0;
  char_t entry_char = 0;
  logic [4:0] remaining = 0;
  logic next, accept, grp_load, grp_last, step_done;
  char_t [RESULT_MAX-1:0] grp_chars;
  logic [3:0] grp_len, step_count;
  logic [15:0] n_match, n_grade1, n_next;
  int checks = 0, failures = 0;
  int e_match = 0, e_g1 = 0, e_next = 0;

  p2b_load_codes dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // present one rule, count pulses until it is withdrawn
  task automatic present(bit f, bit r, bit l, bit empty, bit busy, int rem);
    int nn = 0, na = 0, nl = 0, t = 0;
    bit exp_match;
    rule = '0;
    if (!empty) begin
      rule.flen = 4'($urandom_range(1, 8));
      rule.reslen = 4'($urandom_range(0, 8));
      for (int i = 0; i < 8; i++) rule.result[i] = 8'($urandom_range(33, 90));
    end
    focus_ok = f; right_ok = r; left_ok = l;
    entry_char = 8'($urandom_range(97, 122));
    remaining = 5'(rem);
    grp_ready = !busy;
    rule_valid = 1;
    exp_match = empty || (f && r && l);
    while (t < 20) begin
      @(negedge clk); t++;
      if (t == 5) grp_ready = 1;
      if (next) nn++;
      if (accept) na++;
      if (grp_load) begin
        nl++;
        checks++;
        if (empty) begin
          if (grp_len != 1 || grp_chars[0] != entry_char || step_count != 1 || grp_last != (rem <= 1)) begin
            failures++; $display("FAIL Grade 1 group");
          end
        end else if (grp_len != rule.reslen || grp_chars != rule.result ||
                     step_count != rule.flen || grp_last != (rule.flen >= rem)) begin
          failures++; $display("FAIL match group");
        end
        checks++;
        if (busy && t < 5) begin failures++; $display("FAIL loaded while busy"); end
        checks++;
        if (!step_done) begin failures++; $display("FAIL step_done missing"); end
      end
      if (next || accept) begin
        @(negedge clk); t++;
        rule_valid = 0;
        break;
      end
    end
    rule_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_match ? (na != 1 || nl != 1 || nn != 0) : (nn != 1 || na != 0 || nl != 0)) begin
      failures++; $display("FAIL f%b r%b l%b e%b: next %0d accept %0d load %0d", f, r, l, empty, nn, na, nl);
    end
    if (empty) e_g1++; else if (exp_match) e_match++; else e_next++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      bit empty;
      empty = ($urandom_range(4) == 0);
      present($urandom_range(3) != 0, $urandom_range(3) != 0, $urandom_range(3) != 0,
              empty, $urandom_range(3) == 0, $urandom_range(1, 12));
    end
    checks++;
    if (n_match != 16'(e_match) || n_grade1 != 16'(e_g1) || n_next != 16'(e_next)) begin
      failures++; $display("FAIL counters %0d %0d %0d vs %0d %0d %0d", n_match, n_grade1, n_next, e_match, e_g1, e_next);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
