// tb_kbd_decoder: self-checking test of the keyboard decoder. Drives every
// one of the 64 dot chords, every single function/control key, mixed chords
// and the empty code, and compares the output (and its one-cycle latency)
// with the Computer Braille table of braille_ref_pkg and the key list of the
// keyboard diagram.
module tb_kbd_decoder;
  import cub_pkg::*;
  import braille_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [23:0] code = '1;
  logic code_valid = 0;
  char_t out_code;
  logic out_valid;
  int checks = 0, failures = 0;

  kbd_decoder dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one key image (active-high `keys`), expect `exp` or nothing
  task automatic apply(logic [23:0] keys, bit exp_valid, char_t exp);
    @(negedge clk);
    code = ~keys; code_valid = 1;
    @(negedge clk);
    code_valid = 0;
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_code !== exp)) begin
      failures++;
      $display("FAIL keys=%h: got %b/%h expected %b/%h", keys, out_valid, out_code, exp_valid, exp);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
  endtask

  localparam char_t COL4 [6] = '{8'h0D, 8'h90, 8'h91, 8'h20, 8'h92, 8'h93};

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int ch = 8'h21; ch <= 8'h5F; ch++) apply({18'd0, dots_of(byte'(ch))}, 1, char_t'(ch));
    for (int f = 0; f < 12; f++) apply(24'd1 << (6 + f), 1, char_t'(8'h81 + f));
    for (int k = 0; k < 6; k++) apply(24'd1 << (18 + k), 1, COL4[k]);
    apply(24'd0, 0, 0);                          // nothing pressed
    apply(24'b000001_000000_000001_000001, 0, 0); // dot + F1 + ENTER
    apply(24'b000000_000000_000011_000000, 0, 0); // F1 + F2
    apply(24'b001000_000000_000000_000000, 1, 8'h20); // SPACE key alone
    // code_valid low: nothing comes out
    @(negedge clk); code = 24'hFFFFFE; @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL output without code_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
