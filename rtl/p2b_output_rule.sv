// p2b_output_rule: Output-Rule block of the print-to-Braille translator.
//
// Takes the entry address from Find-Entry and has the flash Interface read
// the rule stored there. The rule is held in a register and presented, with
// rule_valid, to the Focus-, Right-Context- and Left-Context-Check blocks and
// to Load-Translated-Codes. A `next` pulse from Load-Translated-Codes moves to
// the following rule record (RULE_BYTES further on) and reads it; an `accept`
// pulse ends the search. If Find-Entry reports that the entry character has
// no rules, an empty rule (focus length 0) is presented at once, which
// Load-Translated-Codes treats as "translate as Grade 1".
//
// The rule-by-rule search follows the document; the record stride and the
// handshake are this design's own choices.
module p2b_output_rule
  import cub_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // from Find-Entry
  input  logic                 entry_valid,
  input  logic                 entry_found,
  input  logic [FLASH_AW-1:0]  entry_addr,
  // to/from the flash Interface
  output logic                 fetch_req,
  output logic [FLASH_AW-1:0]  fetch_addr,
  input  logic                 fetch_done,
  input  rule_t                fetch_rule,
  // to the checks and Load-Translated-Codes
  output logic                 rule_valid,
  output rule_t                rule,
  // from Load-Translated-Codes
  input  logic                 next,
  input  logic                 accept,
  output logic [15:0]          rules_read   // statistics: rules fetched so far
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_HOLD} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      fetch_req  <= 1'b0;
      fetch_addr <= '0;
      rule_valid <= 1'b0;
      rule       <= '0;
      rules_read <= '0;
    end else begin
      fetch_req <= 1'b0;
      unique case (state)
        S_IDLE: if (entry_valid) begin
          if (entry_found) begin
            fetch_addr <= entry_addr;
            fetch_req  <= 1'b1;
            state      <= S_FETCH;
          end else begin
            rule       <= '0;
            rule_valid <= 1'b1;
            state      <= S_HOLD;
          end
        end
        S_FETCH: if (fetch_done) begin
          rule       <= fetch_rule;
          rule_valid <= 1'b1;
          rules_read <= rules_read + 16'd1;
          state      <= S_HOLD;
        end
        S_HOLD: begin
          if (accept) begin
            rule_valid <= 1'b0;
            state      <= S_IDLE;
          end else if (next) begin
            rule_valid <= 1'b0;
            fetch_addr <= fetch_addr + FLASH_AW'(RULE_BYTES);
            fetch_req  <= 1'b1;
            state      <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
