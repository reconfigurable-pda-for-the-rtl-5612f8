// cub_pkg: types and constants shared by the Braille PDA blocks.
//
// Holds the layout of one translation rule as it is stored in the rule-table
// flash, the unpacked rule that the Output-Rule block hands to the three
// check blocks, the OPB request/response bundles used by the three bus
// slaves, and the Computer Braille / control codes of the keyboard decoder.
//
// Rule record (this design's own layout; only the rule's parts - left context,
// focus, right context, result text - follow the translation algorithm):
//   byte  0      focus length (1..8); 0 marks the end of an entry's rule list
//   byte  1      [7:4] left-context length (0..4), [3:0] right-context length (0..4)
//   byte  2      result length (0..8)
//   byte  3      reserved (0)
//   bytes 4..11  focus characters, first character first
//   bytes 12..15 left context, the character nearest to the focus first
//   bytes 16..19 right context, the character nearest to the focus first
//   bytes 20..27 result text
//   bytes 28..31 reserved
// The flash is 16 bits wide, so one record is 16 half-word reads; the lower
// byte of a half-word holds the even byte address.
package cub_pkg;

  localparam int unsigned FLASH_AW    = 24;  // 16 MB byte address
  localparam int unsigned FLASH_DW    = 16;
  localparam int unsigned RULE_BYTES  = 32;
  localparam int unsigned FOCUS_MAX   = 8;
  localparam int unsigned CTX_MAX     = 4;
  localparam int unsigned RESULT_MAX  = 8;

  typedef logic [7:0] char_t;
  localparam char_t SPACE = 8'h20;

  // One rule after it has been read from the flash.
  typedef struct packed {
    logic [3:0]              flen;     // 0 = end of list
    logic [2:0]              llen;
    logic [2:0]              rlen;
    logic [3:0]              reslen;
    char_t [FOCUS_MAX-1:0]   focus;    // focus[0] = first character
    char_t [CTX_MAX-1:0]     left;     // left[0]  = character just before the focus
    char_t [CTX_MAX-1:0]     right;    // right[0] = character just after the focus
    char_t [RESULT_MAX-1:0]  result;   // result[0] = first output character
  } rule_t;

  // OPB, reduced to the signals a single-master system uses.
  typedef struct packed {
    logic        select;
    logic        rnw;       // 1 = read
    logic [31:0] abus;
    logic [31:0] dbus;      // write data
  } opb_req_t;

  typedef struct packed {
    logic [31:0] dbus;      // read data, zero unless xfer_ack
    logic        xfer_ack;
    logic        tout_sup;  // slave is stalling on purpose
  } opb_rsp_t;

  // Control codes produced by the keyboard decoder for the non-dot keys.
  localparam char_t KEY_ENTER = 8'h0D;
  localparam char_t KEY_SPACE = 8'h20;
  localparam char_t KEY_F1    = 8'h81;   // F1..F12 = 8'h81..8'h8C
  localparam char_t KEY_LEFT  = 8'h90;
  localparam char_t KEY_RIGHT = 8'h91;
  localparam char_t KEY_UP    = 8'h92;
  localparam char_t KEY_DOWN  = 8'h93;

  // Interrupt numbers at the interrupt controller; lower number wins.
  localparam int unsigned IRQ_KBD = 0;
  localparam int unsigned IRQ_P2B = 1;

endpackage
