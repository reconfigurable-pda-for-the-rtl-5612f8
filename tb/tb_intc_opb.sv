// tb_intc_opb: self-checking test of the OPB interrupt controller. Checks
// the register reads and writes, that a one-cycle pulse stays pending until
// acknowledged, that irq needs both the enable mask and the master enable,
// that input 0 (keyboard) wins the vector when both inputs are pending,
// including pulses in the same cycle, and that a pulse arriving with its
// acknowledge is kept.
module tb_intc_opb;
  import cub_pkg::*;
  localparam logic [31:0] BASE = 32'h4120_0000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  opb_req_t opb_m = '0;
  opb_rsp_t opb_s;
  logic [1:0] intr = '0;
  logic irq;
  int checks = 0, failures = 0;

  intc_opb #(.BASE_ADDR(BASE)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one OPB transfer, started at a falling edge, ends at a falling edge
  task automatic xfer(bit rnw, logic [31:0] addr, logic [31:0] wdata, output logic [31:0] rdata);
    int t = 0;
    opb_m.select = 1; opb_m.rnw = rnw; opb_m.abus = addr; opb_m.dbus = rnw ? '0 : wdata;
    #1;
    while (!opb_s.xfer_ack && t < 100) begin @(negedge clk); #1; t++; end
    rdata = opb_s.dbus;
    @(negedge clk);
    opb_m = '0;
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] x; xfer(0, a, d, x);
  endtask
  task automatic expect_rd(logic [31:0] a, logic [31:0] exp, string what);
    logic [31:0] d; xfer(1, a, 0, d);
    checks++;
    if (d !== exp) begin failures++; $display("FAIL %s: read %h expected %h", what, d, exp); end
  endtask
  task automatic expect_irq(bit exp, string what);
    checks++;
    if (irq !== exp) begin failures++; $display("FAIL %s: irq=%b", what, irq); end
  endtask
  task automatic pulse(logic [1:0] v);
    intr = v; @(negedge clk); intr = '0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    expect_rd(BASE + 32'h18, 32'hFFFF_FFFF, "IVR idle");
    pulse(2'b10);                         // translator
    @(negedge clk);
    expect_rd(BASE + 32'h0, 32'h2, "ISR translator pending");
    expect_irq(0, "disabled");
    wr(BASE + 32'h8, 32'h3);              // IER
    @(negedge clk);
    expect_irq(0, "master disabled");
    expect_rd(BASE + 32'h4, 32'h2, "IPR");
    wr(BASE + 32'h1C, 32'h1);             // MER
    @(negedge clk);
    expect_irq(1, "enabled");
    expect_rd(BASE + 32'h18, 32'h1, "IVR translator");
    pulse(2'b01);                         // keyboard as well
    @(negedge clk);
    expect_rd(BASE + 32'h18, 32'h0, "IVR keyboard first");
    wr(BASE + 32'hC, 32'h1);
    expect_rd(BASE + 32'h18, 32'h1, "IVR translator after keyboard ack");
    wr(BASE + 32'hC, 32'h2);
    @(negedge clk);
    expect_irq(0, "all acknowledged");
    expect_rd(BASE + 32'h0, 32'h0, "ISR empty");
    pulse(2'b11);                         // both in the same cycle
    @(negedge clk);
    expect_irq(1, "both");
    expect_rd(BASE + 32'h18, 32'h0, "IVR priority on simultaneous pulses");
    // acknowledge keyboard while a new keyboard pulse arrives
    opb_m.select = 1; opb_m.rnw = 0; opb_m.abus = BASE + 32'hC; opb_m.dbus = 32'h1; intr = 2'b01;
    @(negedge clk);
    opb_m = '0; intr = '0;
    expect_rd(BASE + 32'h0, 32'h3, "pulse during ack kept");
    wr(BASE + 32'hC, 32'h3);
    wr(BASE + 32'h8, 32'h2);
    expect_rd(BASE + 32'h8, 32'h2, "IER readback");
    pulse(2'b01);
    @(negedge clk);
    expect_irq(0, "masked keyboard");
    expect_rd(BASE + 32'h18, 32'hFFFF_FFFF, "IVR masked");
    expect_rd(BASE + 32'h1C, 32'h1, "MER readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
