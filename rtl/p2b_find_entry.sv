// p2b_find_entry: Find-Entry block of the print-to-Braille translator.
//
// Holds, for every 7-bit character code, the flash address of the first rule
// whose focus starts with that character (the document's table of entry
// addresses in alphabetical order; indexing by character code keeps that
// order). A request with an entry character returns, one cycle later, either
// found=1 and the address, or found=0 (the document's fail signal, after
// which the character is passed through as Grade 1 Braille). Characters of
// 0x80 and above are never found.
//
// The table is written through the load port (we/wchar/waddr/wvalid) before
// translation, by the same external loader that writes the rule table into
// the flash; the document leaves that loader out, and this port is this
// design's own choice.
module p2b_find_entry
  import cub_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // table load port
  input  logic                 we,
  input  logic [6:0]           wchar,
  input  logic [FLASH_AW-1:0]  waddr,
  input  logic                 wvalid,
  // lookup
  input  logic                 req,
  input  char_t                req_char,
  output logic                 resp_valid,
  output logic                 resp_found,
  output logic [FLASH_AW-1:0]  resp_addr
);

  logic [FLASH_AW-1:0] addr_tab [128];
  logic [127:0]        valid_tab;

  always_ff @(posedge clk) begin
    if (we) addr_tab[wchar] <= waddr;
  end

  always_ff @(posedge clk) begin
    if (rst) valid_tab <= '0;
    else if (we) valid_tab[wchar] <= wvalid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      resp_valid <= 1'b0;
      resp_found <= 1'b0;
      resp_addr  <= '0;
    end else begin
      resp_valid <= req;
      if (req) begin
        resp_found <= !req_char[7] && valid_tab[req_char[6:0]];
        resp_addr  <= addr_tab[req_char[6:0]];
      end
    end
  end

endmodule
