// p2b_flash_if: Interface between the Output-Rule block and the rule-table
// flash.
//
// On fetch_req it reads the 32-byte rule record at fetch_addr as sixteen
// 16-bit half-words from an asynchronous parallel flash: chip and output
// enable are held low, the half-word address is driven, and the data bus is
// sampled WAIT_CYCLES clock cycles later (the flash access time rounded up to
// whole cycles; 6 cycles = 120 ns at 50 MHz). After the first half-word, a
// focus length of zero (end of the rule list) ends the read early. The
// unpacked rule is returned with a one-cycle fetch_done pulse.
//
// The document only names this interface; the record layout (see cub_pkg),
// the bus width and the timing are this design's own choices.
module p2b_flash_if
  import cub_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 fetch_req,
  input  logic [FLASH_AW-1:0]  fetch_addr,
  output logic                 fetch_done,
  output rule_t                fetch_rule,
  // flash pins
  output logic [FLASH_AW-1:0]  flash_addr,
  output logic                 flash_ce_n,
  output logic                 flash_oe_n,
  input  logic [FLASH_DW-1:0]  flash_dq
);

  localparam int unsigned HWORDS = RULE_BYTES / 2;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DONE} state_t;
  state_t state;

  logic [FLASH_AW-1:0] base;
  logic [3:0]          hw;       // half-word index
  logic [7:0]          wcnt;
  char_t [RULE_BYTES-1:0] rec;

  assign flash_addr = base + {19'd0, hw, 1'b0};
  assign flash_ce_n = (state != S_READ);
  assign flash_oe_n = (state != S_READ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      base       <= '0;
      hw         <= '0;
      wcnt       <= '0;
      fetch_done <= 1'b0;
      rec        <= '0;
    end else begin
      fetch_done <= 1'b0;
      unique case (state)
        S_IDLE: if (fetch_req) begin
          base  <= {fetch_addr[FLASH_AW-1:1], 1'b0};
          hw    <= '0;
          wcnt  <= '0;
          rec   <= '0;
          state <= S_READ;
        end
        S_READ: begin
          if (wcnt == 8'(WAIT_CYCLES - 1)) begin
            wcnt            <= '0;
            rec[2*hw]       <= flash_dq[7:0];
            rec[2*hw + 1]   <= flash_dq[15:8];
            if (hw == 4'(HWORDS - 1) || (hw == 0 && flash_dq[7:0] == 8'd0)) begin
              state <= S_DONE;
            end
            hw <= hw + 4'd1;
          end else begin
            wcnt <= wcnt + 8'd1;
          end
        end
        S_DONE: begin
          fetch_done <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Unpack the record.
  always_comb begin
    fetch_rule        = '0;
    fetch_rule.flen   = (rec[0] > 8'(FOCUS_MAX)) ? 4'(FOCUS_MAX) : rec[0][3:0];
    fetch_rule.llen   = (rec[1][7:4] > 4'(CTX_MAX)) ? 3'(CTX_MAX) : rec[1][6:4];
    fetch_rule.rlen   = (rec[1][3:0] > 4'(CTX_MAX)) ? 3'(CTX_MAX) : rec[1][2:0];
    fetch_rule.reslen = (rec[2] > 8'(RESULT_MAX)) ? 4'(RESULT_MAX) : rec[2][3:0];
    for (int i = 0; i < FOCUS_MAX; i++)  fetch_rule.focus[i]  = rec[4 + i];
    for (int i = 0; i < CTX_MAX; i++)    fetch_rule.left[i]   = rec[12 + i];
    for (int i = 0; i < CTX_MAX; i++)    fetch_rule.right[i]  = rec[16 + i];
    for (int i = 0; i < RESULT_MAX; i++) fetch_rule.result[i] = rec[20 + i];
  end

endmodule
