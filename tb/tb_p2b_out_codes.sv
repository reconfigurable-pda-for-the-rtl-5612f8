// tb_p2b_out_codes: self-checking test of Output-Translated-Codes. Loads
// random groups (0..8 characters, some marked last) whenever grp_ready,
// takes the stream with a random ready, and checks that characters leave in
// order, one per accepted cycle, that word_done follows exactly the last
// groups, and that grp_ready is low while a group is being sent.
module tb_p2b_out_codes;
  import cub_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic grp_load = 0, grp_last = 0, grp_ready, out_valid, out_ready = 0, word_done;
  char_t [RESULT_MAX-1:0] grp_chars = '0;
  logic [3:0] grp_len = 0;
  char_t out_char;
  int checks = 0, failures = 0;
  char_t exp_q[$];
  int exp_done = 0, got_done = 0;

  p2b_out_codes dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_char != exp_q[0]) begin
        failures++; $display("FAIL char %h", out_char);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (word_done) got_done++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < 300; g++) begin
      int t;
      t = 0;
      while (!grp_ready && t < 200) begin
        out_ready = ($urandom_range(2) != 0);
        @(negedge clk); t++;
      end
      grp_len = 4'($urandom_range(0, 8));
      grp_last = ($urandom_range(2) == 0);
      for (int i = 0; i < 8; i++) grp_chars[i] = 8'($urandom());
      for (int i = 0; i < int'(grp_len); i++) exp_q.push_back(grp_chars[i]);
      if (grp_last) exp_done++;
      grp_load = 1;
      out_ready = ($urandom_range(2) != 0);
      @(negedge clk);
      grp_load = 0;
      checks++;
      if (grp_ready) begin failures++; $display("FAIL grp_ready right after load"); end
    end
    out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || got_done != exp_done) begin
      failures++; $display("FAIL %0d left, word_done %0d expected %0d", exp_q.size(), got_done, exp_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
