// cub_soc: the FPGA part of the Braille PDA - the print-to-Braille translator
// IP, the Braille keyboard controller IP and the interrupt controller as
// slaves on one On-chip Peripheral Bus (OPB).
//
// The processor (a 32-bit soft core, the only bus master) is outside this
// module: its OPB request comes in on opb_m and the ORed slave responses go
// back on opb_s; irq is its interrupt input. The translator's rule-table
// flash and its Find-Entry load port, and the keyboard matrix pins, are
// brought out as ports. Interrupt inputs: 0 = keyboard controller (higher
// priority), 1 = translator, as the document specifies.
//
// Address map (this design's choice): translator 0x4000_0000, keyboard
// 0x4001_0000, interrupt controller 0x4120_0000. An access to no slave is
// not acknowledged (the processor's bus timeout handles it).
module cub_soc
  import cub_pkg::*;
#(
  parameter logic [31:0] P2B_BASE          = 32'h4000_0000,
  parameter logic [31:0] KBD_BASE          = 32'h4001_0000,
  parameter logic [31:0] INTC_BASE         = 32'h4120_0000,
  parameter int unsigned WORD_LEN          = 12,
  parameter int unsigned FLASH_WAIT_CYCLES = 6,
  parameter int unsigned DEBOUNCE_CYCLES   = 650_000
) (
  input  logic                 clk,
  input  logic                 rst,
  // OPB from the processor
  input  opb_req_t             opb_m,
  output opb_rsp_t             opb_s,
  output logic                 irq,
  // Braille keyboard matrix
  output logic [3:0]           kbd_col_n,
  input  logic [5:0]           kbd_row_n,
  // rule-table flash
  output logic [FLASH_AW-1:0]  flash_addr,
  output logic                 flash_ce_n,
  output logic                 flash_oe_n,
  input  logic [FLASH_DW-1:0]  flash_dq,
  // Find-Entry table load port
  input  logic                 entry_we,
  input  logic [6:0]           entry_wchar,
  input  logic [FLASH_AW-1:0]  entry_waddr,
  input  logic                 entry_wvalid
);

  opb_rsp_t s_p2b, s_kbd, s_intc;
  logic     irq_p2b, irq_kbd;
  logic [1:0] intr;

  assign intr[IRQ_KBD] = irq_kbd;
  assign intr[IRQ_P2B] = irq_p2b;

  p2b_opb #(.BASE_ADDR(P2B_BASE), .WORD_LEN(WORD_LEN),
            .FLASH_WAIT_CYCLES(FLASH_WAIT_CYCLES)) u_p2b (
    .clk, .rst, .opb_m, .opb_s(s_p2b), .irq(irq_p2b),
    .flash_addr, .flash_ce_n, .flash_oe_n, .flash_dq,
    .entry_we, .entry_wchar, .entry_waddr, .entry_wvalid
  );

  kbd_opb #(.BASE_ADDR(KBD_BASE), .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_kbd (
    .clk, .rst, .opb_m, .opb_s(s_kbd), .irq(irq_kbd), .kbd_col_n, .kbd_row_n
  );

  intc_opb #(.BASE_ADDR(INTC_BASE), .NUM_INTR(2)) u_intc (
    .clk, .rst, .opb_m, .opb_s(s_intc), .intr, .irq
  );

  // OPB slave data and acknowledges are ORed onto the bus.
  assign opb_s = s_p2b | s_kbd | s_intc;

  // At most one slave may answer a transfer.
  assert property (@(posedge clk) disable iff (rst)
    $onehot0({s_p2b.xfer_ack, s_kbd.xfer_ack, s_intc.xfer_ack}));

endmodule
