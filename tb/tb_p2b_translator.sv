// tb_p2b_translator: self-checking test of the print-to-Braille translator.
//
// Loads the test rule table (p2b_rules_pkg) into the flash model and the
// Find-Entry table, feeds a list of words separated by spaces, collects the
// Braille characters up to each word_done and compares every piece with the
// string-based reference translator. The output stream is stalled at random.
// Also checks that the word "and" is translated within 192 cycles (12 us at
// 16 MHz) and that contractions, rule-list exhaustion and the Grade 1
// pass-through of characters without rules all occurred.
module tb_p2b_translator;
  import cub_pkg::*;
  import p2b_rules_pkg::*;

  localparam int unsigned WL = 12;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;
  char_t in_char = 0;
  logic out_valid, out_ready, word_done, busy;
  char_t out_char;
  logic [23:0] flash_addr;
  logic flash_ce_n, flash_oe_n;
  logic [15:0] flash_dq;
  logic entry_we = 0, entry_wvalid = 0;
  logic [6:0] entry_wchar = 0;
  logic [23:0] entry_waddr = 0;
  logic [15:0] n_rules_read, n_match, n_grade1, n_next;

  int checks = 0, failures = 0;

  p2b_translator #(.WORD_LEN(WL)) dut (.*);

  flash_model #(.MEM_BYTES(4096), .LATENCY(5)) u_flash (
    .clk, .addr(flash_addr), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .dq(flash_dq));

  // output collector
  string got = "";
  string got_q[$];
  int    stall_pct = 30;
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) got = {got, string'(out_char)};
    if (!rst && word_done) begin got_q.push_back(got); got = ""; end
    out_ready <= ($urandom_range(99) >= stall_pct);
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All stimulus changes at falling edges; the DUT samples at rising edges.
  task automatic send(byte c);
    in_char  = c;
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic check_word(string w);
    string exp[$];
    ref_translate(w, WL, exp);
    for (int i = 0; i < w.len(); i++) send(w[i]);
    send(" ");
    foreach (exp[i]) begin
      int t = 0;
      while (got_q.size() == 0 && t < 20000) begin @(negedge clk); t++; end
      checks++;
      if (got_q.size() == 0) begin
        failures++; $display("FAIL %s: no word_done", w);
      end else begin
        string g = got_q.pop_front();
        if (g != exp[i]) begin
          failures++; $display("FAIL word '%s' piece %0d: got '%s' expected '%s'", w, i, g, exp[i]);
        end
      end
    end
  endtask

  initial begin
    byte unsigned img[];
    int unsigned ea[128];
    bit ev[128];
    string words[$];
    int t0, t1;

    build_image(img, ea, ev);
    foreach (img[i]) u_flash.mem[i] = img[i];
    out_ready = 1;
    repeat (4) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 128; c++) begin
      entry_we = 1; entry_wchar = 7'(c); entry_waddr = 24'(ea[c]); entry_wvalid = ev[c];
      @(negedge clk);
    end
    entry_we = 0;

    // latency of "and" with the output never stalled
    stall_pct = 0;
    send("a"); send("n"); send("d");
    t0 = $time;
    send(" ");
    while (got_q.size() == 0) @(negedge clk);
    t1 = $time;
    checks++;
    if (got_q.pop_front() != "&") begin failures++; $display("FAIL and -> &"); end
    checks++;
    $display("'and' translated in %0d cycles", (t1 - t0) / 10);
    if ((t1 - t0) / 10 > 192) begin failures++; $display("FAIL latency above 192 cycles"); end

    stall_pct = 30;
    words = '{"and", "hand", "the", "there", "bother", "with", "whose", "for", "fort",
              "can", "chance", "sharing", "stood", "often", "in", "pin", "ending",
              "xx", "xxx", "box", "zebra", "quiz", "but", "butter", "T1", "TAT",
              "123", "AAAAAAAAAA", "abcdefghijklmnop", "q", "year", "wonderful"};
    foreach (words[k]) check_word(words[k]);
    // random words over a small alphabet
    for (int n = 0; n < 60; n++) begin
      string w, alpha;
      int len;
      byte c;
      w = "";
      alpha = "abcdefhinorstwxTA12";
      len = 1 + $urandom_range(13);
      for (int i = 0; i < len; i++) begin
        c = alpha[$urandom_range(alpha.len() - 1)];
        w = {w, string'(c)};
      end
      check_word(w);
    end

    // mechanism coverage
    checks++;
    $display("rules read %0d, fired %0d, next-rule %0d, grade1 %0d",
             n_rules_read, n_match, n_next, n_grade1);
    if (n_match == 0 || n_next == 0 || n_grade1 == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
