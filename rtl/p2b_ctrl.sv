// p2b_ctrl: Translating-Controller of the print-to-Braille translator.
//
// Receives ASCII text one character at a time and stores it in its word
// registers. A space (this design also treats any control character below
// 0x20 as a space) closes the word; so does a word reaching WORD_LEN
// characters, which is then translated as one piece. While a word is being
// translated the input is not ready. The controller then repeatedly offers
// the first untranslated character (the entry character) to Find-Entry with a
// one-cycle entry_req pulse and waits for Load-Translated-Codes to report how
// many characters the fired rule consumed (step_done/step_count). When the
// whole word is consumed it returns to collecting text.
//
// The word, its length and the current position are exported for the three
// context/focus checks; characters outside the word read as spaces.
// The word-by-space splitting follows the document; the word length limit and
// the handshake are this design's own choices.
module p2b_ctrl
  import cub_pkg::*;
#(
  parameter int unsigned WORD_LEN = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  // text input
  input  logic                     in_valid,
  input  char_t                    in_char,
  output logic                     in_ready,
  // to Find-Entry
  output logic                     entry_req,
  output char_t                    entry_char,
  // from Load-Translated-Codes
  input  logic                     step_done,
  input  logic [3:0]               step_count,
  // text window for the checks
  output char_t [WORD_LEN-1:0]     word,
  output logic [4:0]               word_len,
  output logic [4:0]               pos,
  output logic [4:0]               remaining,
  output logic                     busy
);

  typedef enum logic [1:0] {S_COLLECT, S_REQ, S_WAIT} state_t;
  state_t state;

  logic is_delim;
  assign is_delim = (in_char <= SPACE);

  assign in_ready   = (state == S_COLLECT);
  assign entry_req  = (state == S_REQ);
  assign entry_char = word[pos[3:0]];
  assign remaining  = word_len - pos;
  assign busy       = (state != S_COLLECT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_COLLECT;
      word_len <= '0;
      pos      <= '0;
      word     <= '{default: SPACE};
    end else begin
      unique case (state)
        S_COLLECT: if (in_valid) begin
          if (is_delim) begin
            if (word_len != 0) begin
              pos   <= '0;
              state <= S_REQ;
            end
          end else begin
            word[word_len[3:0]] <= in_char;
            word_len            <= word_len + 5'd1;
            if (word_len + 5'd1 == 5'(WORD_LEN)) begin
              pos   <= '0;
              state <= S_REQ;
            end
          end
        end
        S_REQ: state <= S_WAIT;
        S_WAIT: if (step_done) begin
          if ({1'b0, step_count} >= remaining) begin
            word_len <= '0;
            pos      <= '0;
            word     <= '{default: SPACE};
            state    <= S_COLLECT;
          end else begin
            pos   <= pos + 5'(step_count);
            state <= S_REQ;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
