// tb_p2b_flash_if: self-checking test of the flash Interface. Fills the
// flash model with random bytes and known headers, fetches rule records at
// several addresses and checks the unpacked rule (lengths clipped to their
// maxima) against the bytes, the read time of 16 half-words of WAIT_CYCLES
// each, and the early stop after the first half-word on an end-of-list
// record.
module tb_p2b_flash_if;
  import cub_pkg::*;
  localparam int unsigned W = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fetch_req = 0, fetch_done;
  logic [23:0] fetch_addr = 0;
  rule_t fetch_rule;
  logic [23:0] flash_addr;
  logic flash_ce_n, flash_oe_n;
  logic [15:0] flash_dq;
  int checks = 0, failures = 0;

  p2b_flash_if #(.WAIT_CYCLES(W)) dut (.*);
  flash_model #(.MEM_BYTES(1024), .LATENCY(W - 1)) u_flash (
    .clk, .addr(flash_addr), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .dq(flash_dq));

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int unsigned clip(int unsigned v, int unsigned m);
    return (v > m) ? m : v;
  endfunction

  task automatic fetch(int unsigned a, int exp_cycles);
    rule_t e;
    int t = 0;
    e = '0;
    e.flen   = 4'(clip(u_flash.mem[a], FOCUS_MAX));
    e.llen   = 3'(clip(u_flash.mem[a+1] >> 4, CTX_MAX));
    e.rlen   = 3'(clip(u_flash.mem[a+1] & 8'hF, CTX_MAX));
    if (u_flash.mem[a] != 0) begin
      e.reslen = 4'(clip(u_flash.mem[a+2], RESULT_MAX));
      for (int i = 0; i < 8; i++) e.focus[i]  = u_flash.mem[a + 4 + i];
      for (int i = 0; i < 4; i++) e.left[i]   = u_flash.mem[a + 12 + i];
      for (int i = 0; i < 4; i++) e.right[i]  = u_flash.mem[a + 16 + i];
      for (int i = 0; i < 8; i++) e.result[i] = u_flash.mem[a + 20 + i];
    end
    fetch_req = 1; fetch_addr = 24'(a);
    @(negedge clk);
    fetch_req = 0;
    while (!fetch_done && t < 1000) begin @(negedge clk); t++; end
    checks++;
    if (fetch_rule !== e) begin failures++; $display("FAIL rule at %h: %h expected %h", a, fetch_rule, e); end
    checks++;
    if (t != exp_cycles) begin failures++; $display("FAIL fetch at %h took %0d cycles, expected %0d", a, t, exp_cycles); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) u_flash.mem[i] = 8'($urandom());
    u_flash.mem[32] = 3; u_flash.mem[33] = 8'h12; u_flash.mem[34] = 2;
    u_flash.mem[64] = 9; u_flash.mem[65] = 8'h77; u_flash.mem[66] = 12;
    u_flash.mem[96] = 0;
    u_flash.mem[128] = 1; u_flash.mem[129] = 0; u_flash.mem[130] = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    fetch(32, 16 * W + 1);
    fetch(64, 16 * W + 1);
    fetch(96, W + 1);
    fetch(128, 16 * W + 1);
    for (int n = 0; n < 8; n++) begin
      int unsigned a = 32 * $urandom_range(5, 30);
      if (u_flash.mem[a] == 0) u_flash.mem[a] = 1;
      fetch(a, 16 * W + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
