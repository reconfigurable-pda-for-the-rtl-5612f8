// tb_p2b_output_rule: self-checking test of Output-Rule. A stand-in for the
// flash Interface answers each fetch after a random delay with a rule that
// encodes the fetch address. Checks that a found entry fetches its address,
// that `next` fetches the record 32 bytes further on, that `accept` ends
// the walk without a fetch, that an entry without rules yields an empty rule
// at once with no fetch, and the rules_read count.
module tb_p2b_output_rule;
  import cub_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic entry_valid = 0, entry_found = 0;
  logic [23:0] entry_addr = 0;
  logic fetch_req, fetch_done = 0;
  logic [23:0] fetch_addr;
  rule_t fetch_rule = '0;
  logic rule_valid;
  rule_t rule;
  logic next = 0, accept = 0;
  logic [15:0] rules_read;
  int checks = 0, failures = 0, n_fetch = 0;
  logic [23:0] last_fetch;

  p2b_output_rule dut (.*);

  // Interface stand-in
  always @(posedge clk) if (fetch_req && !rst) begin
    automatic logic [23:0] a = fetch_addr;
    n_fetch++;
    last_fetch = a;
    fork begin
      repeat ($urandom_range(1, 6)) @(negedge clk);
      fetch_rule = '0;
      fetch_rule.flen = 4'd3;
      fetch_rule.focus = {40'd0, a};
      fetch_done = 1;
      @(negedge clk);
      fetch_done = 0;
    end join_none
  end

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_rule(logic [23:0] exp_addr, bit empty);
    int t = 0;
    while (!rule_valid && t < 100) begin @(negedge clk); t++; end
    checks++;
    if (!rule_valid) begin failures++; $display("FAIL no rule"); return; end
    if (empty) begin
      if (rule.flen != 0) begin failures++; $display("FAIL expected empty rule"); end
    end else if (rule.flen != 3 || rule.focus[2:0] !== exp_addr) begin
      failures++; $display("FAIL rule for %h, got %h", exp_addr, rule.focus[2:0]);
    end
  endtask

  task automatic pulse_next();
    next = 1; @(negedge clk); next = 0; @(negedge clk);
  endtask
  task automatic pulse_accept();
    accept = 1; @(negedge clk); accept = 0; @(negedge clk);
    checks++;
    if (rule_valid) begin failures++; $display("FAIL rule still valid after accept"); end
  endtask

  initial begin
    int f0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 10; n++) begin
      logic [23:0] base;
      int hops;
      base = 24'($urandom()) & 24'hFFFFE0;
      hops = $urandom_range(0, 4);
      entry_valid = 1; entry_found = 1; entry_addr = base;
      @(negedge clk);
      entry_valid = 0;
      for (int h = 0; h <= hops; h++) begin
        wait_rule(base + 24'(32 * h), 0);
        if (h < hops) pulse_next(); else pulse_accept();
      end
    end
    // entry not found
    f0 = n_fetch;
    entry_valid = 1; entry_found = 0; entry_addr = 24'h55;
    @(negedge clk);
    entry_valid = 0;
    wait_rule(0, 1);
    pulse_accept();
    repeat (10) @(negedge clk);
    checks++;
    if (n_fetch != f0) begin failures++; $display("FAIL fetch for missing entry"); end
    checks++;
    if (rules_read != 16'(n_fetch)) begin failures++; $display("FAIL rules_read %0d vs %0d", rules_read, n_fetch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
