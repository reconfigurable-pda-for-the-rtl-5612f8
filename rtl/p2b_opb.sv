// p2b_opb: Translator IP - the print-to-Braille translator behind its OPB
// registers.
//
// Register map (byte offsets from BASE_ADDR, 32-bit data, bit 0 = LSB):
//   0x0  Reg1  write: bits 7:0 = next ASCII character for the translator
//              read : bit 0 = Reg1 empty (the next write will be taken),
//                     bit 1 = translator busy,
//                     bit 2 = a result is waiting in Reg2..Reg4,
//                     bit 8 = that result is the first part of a longer
//                             word (more follows),
//                     bit 9 = overrun: a write arrived while Reg1 was still
//                             full and was dropped (cleared by this read)
//   0x4  Reg2  read: Braille characters 0..3 of the result
//   0x8  Reg3  read: characters 4..7
//   0xC  Reg4  read: characters 8..11; reading it frees the result registers
// Character i sits in bits 8*(i%4)+7 : 8*(i%4); unused characters are 0.
// Every access is acknowledged in the same cycle (xfer_ack combinational),
// so the three result registers are read in three bus cycles.
//
// Flow: software writes a character when Reg1 is empty; the translator takes
// it from Reg1 when it is ready for text. The translator's Braille stream is
// collected here; when a word is complete (word_done) the characters are
// copied to Reg2..Reg4 and `irq` is high for one clock cycle. A translation
// longer than twelve characters is delivered in pieces: when a thirteenth
// character arrives the twelve collected ones are delivered, flagged "more
// follows". While a delivered result has not been read (up to Reg4) the
// translator's output is held, so no result is overwritten. Writes are never
// stalled, so the processor cannot hang on a bus write while the
// translator waits for it to read a result.
//
// Reg1 as an 8-bit input register, the three 32-bit result registers, the
// twelve-character limit and the one-cycle interrupt follow the document;
// the status bits, the piecewise delivery, the read-to-free rule and the
// byte order are this design's own choices.
module p2b_opb
  import cub_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR         = 32'h4000_0000,
  parameter int unsigned WORD_LEN          = 12,
  parameter int unsigned FLASH_WAIT_CYCLES = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  opb_req_t             opb_m,
  output opb_rsp_t             opb_s,
  output logic                 irq,
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

  localparam int unsigned RES_CHARS = 12;

  logic  hit, wr_reg1, rd_reg4, res_full, overrun, done_pend, take;
  logic  in_full;
  char_t in_reg;
  logic  in_ready, busy;

  logic  out_valid, word_done;
  char_t out_char;
  logic  [15:0] n_rules_read, n_match, n_grade1, n_next;

  char_t [RES_CHARS-1:0] coll, result;
  logic  [3:0]           ncoll;
  logic                  more;

  assign hit     = opb_m.select && (opb_m.abus[31:4] == BASE_ADDR[31:4]);
  assign wr_reg1 = hit && !opb_m.rnw && (opb_m.abus[3:2] == 2'd0);
  assign rd_reg4 = hit && opb_m.rnw && (opb_m.abus[3:2] == 2'd3);
  // A character is taken only when it can be stored: no undelivered result
  // and no word end waiting to be delivered.
  assign take    = !res_full && !done_pend && !word_done;

  always_comb begin
    opb_s          = '0;
    opb_s.xfer_ack = hit;
    if (hit && opb_m.rnw) begin
      unique case (opb_m.abus[3:2])
        2'd0: opb_s.dbus = {22'd0, overrun, more, 5'd0, res_full, busy, !in_full};
        2'd1: opb_s.dbus = result[3:0];
        2'd2: opb_s.dbus = result[7:4];
        default: opb_s.dbus = result[11:8];
      endcase
    end
  end

  p2b_translator #(.WORD_LEN(WORD_LEN), .FLASH_WAIT_CYCLES(FLASH_WAIT_CYCLES)) u_tr (
    .clk, .rst,
    .in_valid(in_full), .in_char(in_reg), .in_ready,
    .out_valid, .out_char, .out_ready(take), .word_done, .busy,
    .flash_addr, .flash_ce_n, .flash_oe_n, .flash_dq,
    .entry_we, .entry_wchar, .entry_waddr, .entry_wvalid,
    .n_rules_read, .n_match, .n_grade1, .n_next
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      in_full <= 1'b0;
      in_reg  <= '0;
      coll    <= '0;
      ncoll   <= '0;
      result  <= '0;
      more     <= 1'b0;
      irq      <= 1'b0;
      res_full <= 1'b0;
      overrun  <= 1'b0;
      done_pend <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (wr_reg1 && !in_full) begin
        in_reg  <= opb_m.dbus[7:0];
        in_full <= 1'b1;
      end else if (in_full && in_ready) begin
        in_full <= 1'b0;
      end
      if (wr_reg1 && in_full) overrun <= 1'b1;
      else if (hit && opb_m.rnw && opb_m.abus[3:2] == 2'd0) overrun <= 1'b0;

      if (rd_reg4) res_full <= 1'b0;

      if (!res_full && (done_pend || word_done)) begin
        result    <= coll;
        more      <= 1'b0;
        irq       <= 1'b1;
        res_full  <= 1'b1;
        done_pend <= 1'b0;
        coll      <= '0;
        ncoll     <= '0;
      end else if (word_done) begin
        done_pend <= 1'b1;
      end else if (out_valid && take) begin
        if (ncoll == 4'(RES_CHARS)) begin
          result   <= coll;
          more     <= 1'b1;
          irq      <= 1'b1;
          res_full <= 1'b1;
          coll     <= '0;
          coll[0]  <= out_char;
          ncoll    <= 4'd1;
        end else begin
          coll[ncoll] <= out_char;
          ncoll       <= ncoll + 4'd1;
        end
      end
    end
  end

endmodule
