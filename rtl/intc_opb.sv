// intc_opb: interrupt controller on the OPB.
//
// Collects NUM_INTR active-high interrupt pulses (one clock cycle each) into
// a pending register and drives the single interrupt request of the
// processor. Input 0 has the highest priority; the system connects the
// keyboard controller to input 0 and the translator to input 1, so that when
// both are pending the keyboard is served first. The vector register returns
// the number of the highest-priority pending and enabled input.
//
// Register map (byte offsets from BASE_ADDR; a subset of the usual layout of
// this kind of controller, an assumption of this design):
//   0x00 ISR  read: pending inputs
//   0x04 IPR  read: pending and enabled inputs
//   0x08 IER  read/write: enable mask
//   0x0C IAR  write: 1s acknowledge (clear) those pending bits
//   0x18 IVR  read: highest-priority pending enabled input, all ones if none
//   0x1C MER  read/write: bit 0 master enable of the irq output
// A pulse arriving in the same cycle as its acknowledge stays pending.
// Accesses are acknowledged in the same cycle. irq is registered.
module intc_opb
  import cub_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h4120_0000,
  parameter int unsigned NUM_INTR  = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  opb_req_t            opb_m,
  output opb_rsp_t            opb_s,
  input  logic [NUM_INTR-1:0] intr,
  output logic                irq
);

  logic [NUM_INTR-1:0] isr, ier, ipr;
  logic                mer;
  logic                hit, wr;
  logic [31:0]         ivr;

  assign hit = opb_m.select && (opb_m.abus[31:5] == BASE_ADDR[31:5]);
  assign wr  = hit && !opb_m.rnw;
  assign ipr = isr & ier;

  always_comb begin
    ivr = '1;
    for (int i = NUM_INTR - 1; i >= 0; i--) if (ipr[i]) ivr = 32'(i);
  end

  always_comb begin
    opb_s          = '0;
    opb_s.xfer_ack = hit;
    if (hit && opb_m.rnw) begin
      unique case (opb_m.abus[4:2])
        3'd0:    opb_s.dbus = 32'(isr);
        3'd1:    opb_s.dbus = 32'(ipr);
        3'd2:    opb_s.dbus = 32'(ier);
        3'd6:    opb_s.dbus = ivr;
        3'd7:    opb_s.dbus = {31'd0, mer};
        default: opb_s.dbus = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      isr <= '0;
      ier <= '0;
      mer <= 1'b0;
      irq <= 1'b0;
    end else begin
      logic [NUM_INTR-1:0] ack;
      ack = (wr && opb_m.abus[4:2] == 3'd3) ? opb_m.dbus[NUM_INTR-1:0] : '0;
      isr <= (isr & ~ack) | intr;
      if (wr && opb_m.abus[4:2] == 3'd2) ier <= opb_m.dbus[NUM_INTR-1:0];
      if (wr && opb_m.abus[4:2] == 3'd7) mer <= opb_m.dbus[0];
      irq <= mer && (((isr & ~ack) | intr) & ier) != 0;
    end
  end

endmodule
