// tb_p2b_opb: self-checking test of the translator IP through its OPB
// registers, acting as the processor. Characters are written to Reg1 after
// polling its "empty" bit; results are read from Reg2..Reg4 in three
// back-to-back bus cycles whenever the status shows one waiting. Every
// delivered piece and its "more follows" flag is compared with the
// reference translator split into twelve-character pieces; the number of
// one-cycle interrupts must equal the number of deliveries. Also checks the
// overrun flag of a write to a full Reg1, and that words longer than twelve
// Braille characters (the overflow path) occurred.
module tb_p2b_opb;
  import cub_pkg::*;
  import p2b_rules_pkg::*;
  localparam logic [31:0] BASE = 32'h4000_0000;
  localparam int unsigned WL = 12;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  opb_req_t opb_m = '0;
  opb_rsp_t opb_s;
  logic irq;
  logic [23:0] flash_addr;
  logic flash_ce_n, flash_oe_n;
  logic [15:0] flash_dq;
  logic entry_we = 0, entry_wvalid = 0;
  logic [6:0] entry_wchar = 0;
  logic [23:0] entry_waddr = 0;
  int checks = 0, failures = 0;
  int n_irq = 0, n_deliv = 0, n_more = 0, n_3cyc_fail = 0;

  p2b_opb #(.BASE_ADDR(BASE)) dut (.*);
  flash_model #(.MEM_BYTES(4096), .LATENCY(5)) u_flash (
    .clk, .addr(flash_addr), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .dq(flash_dq));

  always @(posedge clk) if (!rst && irq) n_irq++;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(bit rnw, logic [31:0] addr, logic [31:0] wdata, output logic [31:0] rdata);
    int t = 0;
    opb_m.select = 1; opb_m.rnw = rnw; opb_m.abus = addr; opb_m.dbus = rnw ? '0 : wdata;
    #1;
    while (!opb_s.xfer_ack && t < 100) begin @(negedge clk); #1; t++; end
    rdata = opb_s.dbus;
    @(negedge clk);
    opb_m = '0;
  endtask

  string exp_s[$];
  bit    exp_more[$];

  // read a waiting result, compare with the next expected piece
  task automatic take_result(logic [31:0] status);
    logic [31:0] r2, r3, r4;
    string g = "";
    int t0;
    t0 = $time;
    xfer(1, BASE + 4, 0, r2);
    xfer(1, BASE + 8, 0, r3);
    xfer(1, BASE + 12, 0, r4);
    if (($time - t0) != 30) n_3cyc_fail++;
    for (int i = 0; i < 12; i++) begin
      logic [31:0] w = (i < 4) ? r2 : (i < 8) ? r3 : r4;
      byte c = w[8*(i%4) +: 8];
      if (c != 0) g = {g, string'(c)};
    end
    n_deliv++;
    if (status[8]) n_more++;
    checks++;
    if (exp_s.size() == 0) begin
      failures++; $display("FAIL unexpected result '%s'", g);
    end else begin
      string e = exp_s.pop_front();
      bit    m = exp_more.pop_front();
      if (g != e || status[8] != m) begin
        failures++; $display("FAIL result '%s' more=%b expected '%s' more=%b", g, status[8], e, m);
      end
    end
  endtask

  task automatic poll_results();
    logic [31:0] st;
    xfer(1, BASE, 0, st);
    if (st[2]) take_result(st);
  endtask

  task automatic put_char(byte c);
    logic [31:0] st, x;
    int t = 0;
    forever begin
      xfer(1, BASE, 0, st);
      if (st[2]) take_result(st);
      if (st[0]) break;
      if (++t > 100000) begin failures++; $display("FAIL Reg1 never empty"); break; end
    end
    xfer(0, BASE, {24'd0, c}, x);
  endtask

  task automatic expect_word(string w);
    string pieces[$];
    ref_translate(w, WL, pieces);
    foreach (pieces[k]) begin
      string p = pieces[k];
      for (int s = 0; s < p.len(); s += 12) begin
        int e = (s + 12 < p.len()) ? s + 11 : p.len() - 1;
        exp_s.push_back(p.substr(s, e));
        exp_more.push_back(e != p.len() - 1);
      end
    end
  endtask

  initial begin
    byte unsigned img[];
    int unsigned ea[128];
    bit ev[128];
    string words[$];
    logic [31:0] st, x;
    int t;

    build_image(img, ea, ev);
    foreach (img[i]) u_flash.mem[i] = img[i];
    repeat (4) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 128; c++) begin
      entry_we = 1; entry_wchar = 7'(c); entry_waddr = 24'(ea[c]); entry_wvalid = ev[c];
      @(negedge clk);
    end
    entry_we = 0;

    words = '{"and", "the", "there", "butter", "TTTTTTT", "TATATATATATA", "123123123",
              "xx", "zebra", "sharing", "thethethethe", "AAAAAAAAAAAAAAAAAA", "ok"};
    foreach (words[k]) begin
      string w;
      w = words[k];
      expect_word(w);
      for (int i = 0; i < w.len(); i++) put_char(w[i]);
      put_char(" ");
    end
    // overrun: two writes in consecutive cycles, the second is dropped
    expect_word("q");
    put_char("q");
    xfer(0, BASE, {24'd0, 8'h7A}, x);   // 'z' while 'q' is still in Reg1
    xfer(1, BASE, 0, st);
    checks++;
    if (!st[9]) begin failures++; $display("FAIL overrun flag not set"); end
    xfer(1, BASE, 0, st);
    checks++;
    if (st[9]) begin failures++; $display("FAIL overrun flag not cleared by read"); end
    put_char(" ");
    t = 0;
    while (exp_s.size() != 0 && t < 100000) begin poll_results(); t++; end
    repeat (200) @(negedge clk);
    poll_results();
    checks++;
    if (exp_s.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_s.size()); end
    checks++;
    if (n_irq != n_deliv) begin failures++; $display("FAIL %0d interrupts for %0d results", n_irq, n_deliv); end
    checks++;
    if (n_3cyc_fail != 0) begin failures++; $display("FAIL result read not in 3 cycles"); end
    checks++;
    if (n_more == 0) begin failures++; $display("FAIL overflow path never taken"); end
    $display("deliveries %0d, of which split %0d", n_deliv, n_more);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
