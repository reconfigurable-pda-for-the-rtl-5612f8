// kbd_opb: Keyboard Controller IP - the Braille keyboard controller behind
// its 8-bit OPB register.
//
// Register map (byte offset from BASE_ADDR):
//   0x0  Reg1  read: bits 7:0 = last key code (Computer Braille character or
//              control code), bit 8 = a new code has arrived since the last
//              read (cleared by the read)
// Reads are acknowledged in the same cycle. When a new code arrives it is
// written to Reg1 and `irq` is high for one clock cycle. The 8-bit register
// and the one-cycle data-ready interrupt follow the document; the "new" flag
// is this design's own addition.
module kbd_opb
  import cub_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR       = 32'h4001_0000,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000
) (
  input  logic        clk,
  input  logic        rst,
  input  opb_req_t    opb_m,
  output opb_rsp_t    opb_s,
  output logic        irq,
  output logic [3:0]  kbd_col_n,
  input  logic [5:0]  kbd_row_n
);

  char_t key_code, reg1;
  logic  key_valid, fresh;
  logic  hit;

  assign hit = opb_m.select && (opb_m.abus[31:4] == BASE_ADDR[31:4]);

  always_comb begin
    opb_s          = '0;
    opb_s.xfer_ack = hit;
    if (hit && opb_m.rnw) opb_s.dbus = {23'd0, fresh, reg1};
  end

  kbd_controller #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_kc (
    .clk, .rst, .col_n(kbd_col_n), .row_n(kbd_row_n), .key_code, .key_valid);

  always_ff @(posedge clk) begin
    if (rst) begin
      reg1  <= '0;
      fresh <= 1'b0;
      irq   <= 1'b0;
    end else begin
      irq <= key_valid;
      if (key_valid) begin
        reg1  <= key_code;
        fresh <= 1'b1;
      end else if (hit && opb_m.rnw) begin
        fresh <= 1'b0;
      end
    end
  end

endmodule
