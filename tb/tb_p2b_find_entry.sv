// tb_p2b_find_entry: self-checking test of Find-Entry. Writes a random set
// of entry addresses (some characters left without rules, one entry written
// and then removed), then looks up all 256 character codes and checks found
// and address one cycle after each request; codes 0x80 and above must fail.
module tb_p2b_find_entry;
  import cub_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we = 0, wvalid = 0, req = 0;
  logic [6:0] wchar = 0;
  logic [23:0] waddr = 0;
  char_t req_char = 0;
  logic resp_valid, resp_found;
  logic [23:0] resp_addr;
  int checks = 0, failures = 0;

  p2b_find_entry dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit          ref_v [128];
  logic [23:0] ref_a [128];

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 128; c++) begin
      ref_v[c] = ($urandom_range(3) != 0);
      ref_a[c] = 24'($urandom());
      if (ref_v[c]) begin
        we = 1; wchar = 7'(c); waddr = ref_a[c]; wvalid = 1;
        @(negedge clk);
      end
    end
    // write 'q' then remove it
    we = 1; wchar = 7'h71; waddr = 24'h123456; wvalid = 1; @(negedge clk);
    wvalid = 0; @(negedge clk);
    ref_v[8'h71] = 0;
    we = 0;
    for (int c = 0; c < 256; c++) begin
      req = 1; req_char = char_t'(c);
      @(negedge clk);
      req = 0;
      checks++;
      if (!resp_valid) begin failures++; $display("FAIL no response for %h", c); end
      else if (c >= 128) begin
        if (resp_found) begin failures++; $display("FAIL %h found", c); end
      end else if (resp_found !== ref_v[c] || (ref_v[c] && resp_addr !== ref_a[c])) begin
        failures++; $display("FAIL %h: %b %h expected %b %h", c, resp_found, resp_addr, ref_v[c], ref_a[c]);
      end
      @(negedge clk);
      checks++;
      if (resp_valid) begin failures++; $display("FAIL response longer than a cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
