// flash_model: behavioural, cycle-based model of the on-board parallel
// NOR flash that holds the translation rule table (not synthesizable logic:
// it stands in for an off-chip memory chip in simulation).
//
// 16-bit data bus, byte address; the half-word at address A holds byte A in
// bits 7:0 and byte A+1 in bits 15:8. Data for a new address appears LATENCY
// clock cycles after the address (a stand-in for the chip's access time);
// while the chip or output enable is high the bus reads as zero. Only
// MEM_BYTES bytes are modelled; the address wraps. Testbenches fill `mem`
// directly (it is not cleared here, so that their initial writes win).
module flash_model #(
  parameter int unsigned MEM_BYTES = 4096,
  parameter int unsigned LATENCY   = 5
) (
  input  logic        clk,
  input  logic [23:0] addr,
  input  logic        ce_n,
  input  logic        oe_n,
  output logic [15:0] dq
);
  logic [7:0]  mem [MEM_BYTES];
  logic [15:0] pipe [LATENCY];
  int unsigned a;

  initial begin
    for (int i = 0; i < int'(LATENCY); i++) pipe[i] = 16'h0;
  end

  always @(posedge clk) begin
    a = {8'd0, addr[23:1], 1'b0} % MEM_BYTES;
    pipe[0] <= (ce_n || oe_n) ? 16'h0 : {mem[a + 1], mem[a]};
    for (int i = 1; i < int'(LATENCY); i++) pipe[i] <= pipe[i-1];
  end

  assign dq = pipe[LATENCY-1];
endmodule
