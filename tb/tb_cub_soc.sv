// tb_cub_soc: end-to-end test of the whole FPGA system at its default
// parameters (650000-cycle keyboard debounce, 6-cycle flash access), with
// the testbench playing the processor, the rule-table flash and a user at
// the Braille keyboard.
//
// The processor model follows the simple application of the design: a
// global mode flag (0 idle, 1 note taking, 2 translating) is set by the
// keyboard interrupt handler (F1 -> note taking, F2 -> translating, other
// function keys -> idle, any other key counted); in translating mode the
// main loop feeds text to the translator, and the translator interrupt
// handler reads the three result registers. Interrupts are served through
// the interrupt controller's vector register.
//
// Scenario: F2 switches to translation; a list of words is translated and
// every result compared with the reference translator; then, with the
// interrupt master enable off, a last word is translated while a key is
// typed, so both interrupts are pending together and the keyboard must be
// served first; then F1 switches to note taking and a staggered chord and a
// second chord are typed and must be "printed". Counts and checks: mode
// switches, keyboard codes, translation results, results split because
// they exceed twelve characters, rule contractions, rules skipped,
// Grade 1 pass-through and the simultaneous-interrupt case.
module tb_cub_soc;
  import cub_pkg::*;
  import p2b_rules_pkg::*;
  import braille_ref_pkg::*;

  localparam logic [31:0] P2B  = 32'h4000_0000;
  localparam logic [31:0] KBD  = 32'h4001_0000;
  localparam logic [31:0] INTC = 32'h4120_0000;
  localparam int unsigned DEB    = 650_000;     // the design's default
  localparam int unsigned PERIOD = 4 * DEB + 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  opb_req_t opb_m = '0;
  opb_rsp_t opb_s;
  logic irq;
  logic [3:0] kbd_col_n;
  logic [5:0] kbd_row_n;
  logic [23:0] flash_addr;
  logic flash_ce_n, flash_oe_n;
  logic [15:0] flash_dq;
  logic entry_we = 0, entry_wvalid = 0;
  logic [6:0] entry_wchar = 0;
  logic [23:0] entry_waddr = 0;
  logic [23:0] pressed = '0;

  cub_soc dut (.*);
  flash_model #(.MEM_BYTES(4096), .LATENCY(5)) u_flash (
    .clk, .addr(flash_addr), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .dq(flash_dq));
  kbd_matrix_model u_kb (.col_n(kbd_col_n), .pressed, .row_n(kbd_row_n));

  int checks = 0, failures = 0;
  int n_mode = 0, n_key = 0, n_result = 0, n_split = 0, n_both = 0;
  int global_flag = 0, cnt = 0;
  string printed = "";
  string exp_s[$];
  bit    exp_more[$];

  initial begin
    #2_000_000_000;   // 200 M cycles
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
    if (!opb_s.xfer_ack) begin failures++; $display("FAIL no acknowledge at %h", addr); end
    rdata = opb_s.dbus;
    @(negedge clk);
    opb_m = '0;
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] x; xfer(0, a, d, x);
  endtask

  // ---------------- interrupt handlers ----------------
  task automatic keyboard_isr();
    logic [31:0] k;
    xfer(1, KBD, 0, k);
    n_key++;
    if (k[7:0] == KEY_F1) begin global_flag = 1; n_mode++; end
    else if (k[7:0] == KEY_F1 + 8'd1) begin global_flag = 2; n_mode++; end
    else if (k[7:0] > KEY_F1 + 8'd1 && k[7:0] <= KEY_F1 + 8'd11) global_flag = 0;
    else begin
      cnt++;
      if (global_flag == 1) printed = {printed, string'(k[7:0])};
    end
  endtask

  task automatic translator_isr();
    logic [31:0] st, r2, r3, r4;
    string g = "";
    xfer(1, P2B, 0, st);
    xfer(1, P2B + 4, 0, r2);
    xfer(1, P2B + 8, 0, r3);
    xfer(1, P2B + 12, 0, r4);
    for (int i = 0; i < 12; i++) begin
      logic [31:0] w = (i < 4) ? r2 : (i < 8) ? r3 : r4;
      byte c = w[8*(i%4) +: 8];
      if (c != 0) g = {g, string'(c)};
    end
    n_result++;
    if (st[8]) n_split++;
    checks++;
    if (exp_s.size() == 0) begin
      failures++; $display("FAIL unexpected result '%s'", g);
    end else begin
      string e = exp_s.pop_front();
      bit    m = exp_more.pop_front();
      if (g != e || st[8] != m) begin
        failures++; $display("FAIL result '%s' more=%b expected '%s' more=%b", g, st[8], e, m);
      end
    end
  endtask

  // serve every pending interrupt, highest priority first
  task automatic serve();
    logic [31:0] v;
    forever begin
      xfer(1, INTC + 32'h18, 0, v);
      if (v == 32'hFFFF_FFFF) break;
      if (v == IRQ_KBD) keyboard_isr(); else translator_isr();
      wr(INTC + 32'hC, 32'd1 << v);
    end
  endtask

  task automatic expect_word(string w);
    string pieces[$];
    ref_translate(w, 12, pieces);
    foreach (pieces[k]) begin
      string p = pieces[k];
      for (int s = 0; s < p.len(); s += 12) begin
        int e = (s + 12 < p.len()) ? s + 11 : p.len() - 1;
        exp_s.push_back(p.substr(s, e));
        exp_more.push_back(e != p.len() - 1);
      end
    end
  endtask

  // main-loop step of translation mode: one character into Reg1
  task automatic put_char(byte c);
    logic [31:0] st, x;
    int polls = 0;
    forever begin
      if (irq) serve();
      xfer(1, P2B, 0, st);
      if (st[0]) break;
      polls++;
      if (polls > 20000) begin
        failures++;
        $display("FAIL translator input register never emptied");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    xfer(0, P2B, {24'd0, c}, x);
  endtask

  task automatic idle(int n);
    for (int i = 0; i < n; i++) begin
      if (irq) serve(); else @(negedge clk);
    end
  endtask

  // ---------------- the user at the keyboard ----------------
  task automatic session(logic [23:0] a, logic [23:0] b);
    pressed = a;      repeat (2 * PERIOD) @(negedge clk);
    pressed = a | b;  repeat (PERIOD) @(negedge clk);
    pressed = b;      repeat (PERIOD) @(negedge clk);
    pressed = '0;
  endtask

  initial begin
    byte unsigned img[];
    int unsigned ea[128];
    bit ev[128];
    string words[$];
    logic [31:0] v;
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
    wr(INTC + 32'h8, 32'h3);
    wr(INTC + 32'h1C, 32'h1);

    // F2: translation mode
    fork session(24'd1 << 7, 24'd0); join_none
    t = 0;
    while (global_flag != 2 && t < 4 * PERIOD) begin idle(1); t++; end
    checks++;
    if (global_flag != 2) begin failures++; $display("FAIL F2 did not select translation"); end

    words = '{"and", "the", "with", "sharing", "butter", "xx", "zebra", "hand",
              "AAAAAAAAAAAAAAAAAA", "stood", "TAT", "123"};
    foreach (words[k]) begin
      string w;
      w = words[k];
      expect_word(w);
      for (int i = 0; i < w.len(); i++) put_char(w[i]);
      put_char(" ");
    end
    t = 0;
    while (exp_s.size() != 0 && t < 100000) begin idle(1); t++; end

    // both interrupts pending at once
    wr(INTC + 32'h1C, 32'h0);
    expect_word("the");
    put_char("t"); put_char("h"); put_char("e"); put_char(" ");
    session({18'd0, dots_of("A")}, 24'd0);
    t = 0;
    do begin xfer(1, INTC, 0, v); t++; end while (v != 3 && t < 3 * PERIOD);
    checks++;
    if (v != 3) begin failures++; $display("FAIL both interrupts not pending (ISR=%h)", v); end
    else n_both++;
    xfer(1, INTC + 32'h18, 0, v);
    checks++;
    if (v != IRQ_KBD) begin failures++; $display("FAIL vector %0d, keyboard expected first", v); end
    wr(INTC + 32'h1C, 32'h1);
    idle(10);
    checks++;
    if (exp_s.size() != 0 || cnt != 1) begin
      failures++; $display("FAIL after both: %0d results missing, cnt=%0d", exp_s.size(), cnt);
    end

    // F1: note taking, then a chord typed with staggered keys, then '&'
    session(24'd1 << 6, 24'd0);
    idle(3 * PERIOD);
    checks++;
    if (global_flag != 1) begin failures++; $display("FAIL F1 did not select note taking"); end
    session({18'd0, dots_of("B") & 6'b000001}, {18'd0, dots_of("B")});
    idle(3 * PERIOD);
    session({18'd0, dots_of("&")}, 24'd0);
    idle(3 * PERIOD);
    checks++;
    if (printed != "B&") begin failures++; $display("FAIL note taking printed '%s'", printed); end

    // mechanism counts
    $display("modes %0d keys %0d results %0d split %0d both %0d fired %0d next %0d grade1 %0d",
             n_mode, n_key, n_result, n_split, n_both,
             dut.u_p2b.n_match, dut.u_p2b.n_next, dut.u_p2b.n_grade1);
    checks++; if (n_mode < 2)  begin failures++; $display("FAIL mode switch count"); end
    checks++; if (n_key != 5)  begin failures++; $display("FAIL key count %0d", n_key); end
    checks++; if (n_split == 0) begin failures++; $display("FAIL no split result"); end
    checks++; if (n_both == 0) begin failures++; $display("FAIL no simultaneous interrupts"); end
    checks++; if (dut.u_p2b.n_match == 0) begin failures++; $display("FAIL no rule fired"); end
    checks++; if (dut.u_p2b.n_next == 0) begin failures++; $display("FAIL no rule skipped"); end
    checks++; if (dut.u_p2b.n_grade1 == 0) begin failures++; $display("FAIL no Grade 1 pass-through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
