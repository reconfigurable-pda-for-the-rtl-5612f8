// tb_p2b_ctrl: self-checking test of the Translating-Controller. Feeds
// words separated by one or more spaces or control characters, answers each
// entry request after a random delay with a random number of characters
// consumed, and checks the entry character and position of every request,
// the word window, that no text is accepted while a word is translated, and
// that a word longer than WORD_LEN is cut into WORD_LEN-character pieces.
module tb_p2b_ctrl;
  import cub_pkg::*;
  localparam int unsigned WL = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, entry_req, step_done = 0, busy;
  char_t in_char = 0, entry_char;
  logic [3:0] step_count = 0;
  char_t [WL-1:0] word;
  logic [4:0] word_len, pos, remaining;
  int checks = 0, failures = 0, n_req = 0;

  p2b_ctrl #(.WORD_LEN(WL)) dut (.*);

  initial begin
    #5_000_000; failures++; $display("watchdog: requests %0d, state %0d, pieces left %0d", n_req, dut.state, piece_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  string piece_q[$];   // pieces the controller should translate, in order

  // translation side: follow each request
  initial begin
    string p;
    int ppos;
    ppos = 0;
    @(negedge clk);
    forever begin
      if (!entry_req) @(negedge clk);
      else begin
        n_req++;
        if (ppos == 0) begin
          if (piece_q.size() == 0) begin failures++; $display("FAIL unexpected request"); p = "?"; end
          else p = piece_q.pop_front();
        end
        checks++;
        if (entry_char != p[ppos] || pos != 5'(ppos) || word_len != 5'(p.len()) || in_ready) begin
          failures++;
          $display("FAIL request: char %c pos %0d len %0d, expected %c %0d %0d", entry_char, pos, word_len, p[ppos], ppos, p.len());
        end
        for (int i = 0; i < p.len(); i++) if (word[i] != p[i]) begin
          failures++; $display("FAIL window '%s' at %0d", p, i); break;
        end
        repeat ($urandom_range(1, 5)) @(negedge clk);
        step_count = 4'($urandom_range(1, 4));
        step_done = 1;
        @(negedge clk);
        step_done = 0;
        ppos += step_count;
        if (ppos >= p.len()) ppos = 0;
      end
    end
  end

  task automatic send(byte c);
    in_char = c; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      string w;
      int len;
      len = $urandom_range(1, 30);
      w = "";
      for (int i = 0; i < len; i++) w = {w, string'(8'($urandom_range(33, 126)))};
      for (int s = 0; s < len; s += WL)
        piece_q.push_back(w.substr(s, (s + WL < len) ? s + WL - 1 : len - 1));
      for (int i = 0; i < len; i++) send(w[i]);
      send(($urandom_range(1) == 0) ? 8'h20 : 8'h0A);
      if ($urandom_range(3) == 0) send(" ");   // extra delimiter, ignored
    end
    repeat (100) @(negedge clk);
    checks++;
    if (piece_q.size() != 0) begin failures++; $display("FAIL %0d pieces never translated", piece_q.size()); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("requests %0d", n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
