// tb_kbd_opb: self-checking test of the keyboard controller IP. Types chords
// on the matrix model, checks the one-cycle interrupt, then reads Reg1 over
// the OPB and checks the code and the "new" flag, which a second read clears.
module tb_kbd_opb;
  import cub_pkg::*;
  import braille_ref_pkg::*;
  localparam logic [31:0] BASE = 32'h4001_0000;
  localparam int unsigned DEB = 4;
  localparam int unsigned PERIOD = 4 * DEB + 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  opb_req_t opb_m = '0;
  opb_rsp_t opb_s;
  logic irq;
  logic [3:0] kbd_col_n;
  logic [5:0] kbd_row_n;
  logic [23:0] pressed = '0;
  int checks = 0, failures = 0;
  int n_irq = 0, irq_len = 0, max_irq_len = 0;

  kbd_opb #(.BASE_ADDR(BASE), .DEBOUNCE_CYCLES(DEB)) dut (.*);
  kbd_matrix_model u_kb (.col_n(kbd_col_n), .pressed, .row_n(kbd_row_n));

  always @(posedge clk) begin
    if (!rst && irq) begin irq_len++; if (irq_len == 1) n_irq++; end else irq_len = 0;
    if (irq_len > max_irq_len) max_irq_len = irq_len;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(logic [31:0] addr, output logic [31:0] rdata);
    int t = 0;
    opb_m.select = 1; opb_m.rnw = 1; opb_m.abus = addr; opb_m.dbus = '0;
    #1;
    while (!opb_s.xfer_ack && t < 100) begin @(negedge clk); #1; t++; end
    rdata = opb_s.dbus;
    @(negedge clk);
    opb_m = '0;
  endtask

  task automatic key(logic [23:0] keys, char_t exp);
    logic [31:0] d;
    int n_before = n_irq;
    pressed = keys;
    repeat (2 * PERIOD) @(negedge clk);
    pressed = '0;
    repeat (3 * PERIOD) @(negedge clk);
    checks++;
    if (n_irq != n_before + 1) begin failures++; $display("FAIL %0d interrupts", n_irq - n_before); end
    rd(BASE, d);
    checks++;
    if (d !== {23'd0, 1'b1, exp}) begin failures++; $display("FAIL Reg1 %h expected new + %h", d, exp); end
    rd(BASE, d);
    checks++;
    if (d !== {23'd0, 1'b0, exp}) begin failures++; $display("FAIL Reg1 after read %h", d); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(BASE, d);
    checks++;
    if (d !== 32'h0) begin failures++; $display("FAIL Reg1 after reset %h", d); end
    key({18'd0, dots_of("A")}, "A");
    key({18'd0, dots_of("&")}, "&");
    key(24'd1 << 7, KEY_F1 + 8'd1);
    key(24'd1 << 22, KEY_UP);
    checks++;
    if (max_irq_len != 1) begin failures++; $display("FAIL irq high for %0d cycles", max_irq_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
