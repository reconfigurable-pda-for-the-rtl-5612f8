// tb_kbd_controller: self-checking test of the Braille keyboard controller
// (scanner + decoder) on the matrix model, with a short debounce time.
// Types Braille characters as dot chords, function keys and control keys,
// and checks each resulting code and that it arrives within two scan periods
// plus three cycles of the release.
module tb_kbd_controller;
  import cub_pkg::*;
  import braille_ref_pkg::*;
  localparam int unsigned DEB = 5;
  localparam int unsigned PERIOD = 4 * DEB + 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] col_n;
  logic [5:0] row_n;
  logic [23:0] pressed = '0;
  char_t key_code;
  logic key_valid;
  int checks = 0, failures = 0;

  kbd_controller #(.DEBOUNCE_CYCLES(DEB)) dut (.*);
  kbd_matrix_model u_kb (.col_n, .pressed, .row_n);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic type_keys(logic [23:0] keys, bit exp_valid, char_t exp);
    int t = 0;
    bit seen = 0;
    pressed = keys;
    repeat (2 * PERIOD) @(negedge clk);
    pressed = '0;
    while (t < 2 * PERIOD + 3) begin
      @(negedge clk); t++;
      if (key_valid) begin
        seen = 1;
        checks++;
        if (!exp_valid || key_code !== exp) begin
          failures++; $display("FAIL keys %h gave %h", keys, key_code);
        end
      end
    end
    checks++;
    if (exp_valid && !seen) begin failures++; $display("FAIL keys %h gave nothing in time", keys); end
    repeat (PERIOD) @(negedge clk);
  endtask

  initial begin
    string text = "HELLO,WORLD&?!(7)";
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < text.len(); i++) type_keys({18'd0, dots_of(text[i])}, 1, text[i]);
    type_keys(24'd1 << 6, 1, KEY_F1);
    type_keys(24'd1 << 7, 1, KEY_F1 + 8'd1);
    type_keys(24'd1 << 18, 1, KEY_ENTER);
    type_keys(24'd1 << 21, 1, KEY_SPACE);
    type_keys(24'h040001, 0, 0);   // dot 1 with ENTER: not a valid chord
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
