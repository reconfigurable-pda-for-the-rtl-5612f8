// tb_kbd_scanner: self-checking test of the keyboard Code Scanner with a
// short debounce time. Checks the column drive sequence 0111, 1011, 1101,
// 1110 and its timing (DEBOUNCE cycles per column plus one cycle for
// State4), then plays key sessions on the matrix model - single keys, keys of
// several columns, and chords whose keys go down and up at different times -
// and checks that exactly one non-empty 24-bit image per session comes out,
// only after every key is released, holding every key pressed in the
// session.
module tb_kbd_scanner;
  localparam int unsigned DEB = 7;
  localparam int unsigned PERIOD = 4 * DEB + 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] col_n;
  logic [5:0] row_n;
  logic [23:0] code, pressed = '0;
  logic code_valid;
  int checks = 0, failures = 0;

  kbd_scanner #(.DEBOUNCE_CYCLES(DEB)) dut (.*);
  kbd_matrix_model u_kb (.col_n, .pressed, .row_n);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture every non-empty image
  logic [23:0] got_q[$];
  int          n_empty = 0;
  always @(posedge clk) if (!rst && code_valid) begin
    if (code != '1) got_q.push_back(code); else n_empty++;
    if (pressed != 0 && code != '1) begin
      failures++; $display("FAIL image sent while a key is still held");
    end
  end

  task automatic wait_periods(int n);
    repeat (n * PERIOD) @(negedge clk);
  endtask

  task automatic session(logic [23:0] a, logic [23:0] b);
    // a goes down, then b joins, then a is released, then b
    pressed = a;       wait_periods(2);
    pressed = a | b;   wait_periods(2);
    pressed = b;       wait_periods(2);
    pressed = '0;      wait_periods(3);
    checks++;
    if (got_q.size() != 1) begin
      failures++; $display("FAIL %0d images for session %h/%h", got_q.size(), a, b);
    end else begin
      logic [23:0] g = got_q.pop_front();
      if (g !== ~(a | b)) begin
        failures++; $display("FAIL image %h expected %h", g, ~(a | b));
      end
    end
    got_q = {};
  endtask

  initial begin
    logic [3:0] exp_cols [4] = '{4'b1110, 4'b1101, 4'b1011, 4'b0111};  // {I3..I0}
    repeat (3) @(negedge clk);
    rst = 0;
    // column sequence and timing: col_n[0] = I0 is low first
    for (int rnd = 0; rnd < 2; rnd++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (col_n !== exp_cols[c]) begin
          failures++; $display("FAIL column %0d drive %b expected %b", c, col_n, exp_cols[c]);
        end
        repeat (DEB) @(negedge clk);
        if (c == 3) @(negedge clk);   // State4
      end
    session(24'h000001, 24'h000000);          // dot 1
    session(24'h000005, 24'h000020);          // dots 1,3 then dot 6
    session(24'h000040, 24'h000000);          // F1
    session(24'h800000, 24'h000000);          // DOWN
    session(24'h00003F, 24'h000000);          // all six dots
    for (int n = 0; n < 10; n++) session(24'($urandom()) & 24'hFFFFFF, 24'($urandom()) & 24'h00003F);
    checks++;
    if (n_empty == 0) begin failures++; $display("FAIL no idle scan reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
