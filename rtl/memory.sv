// Unified instruction and data memory.
//
// The processor uses 16-bit byte addresses and 16-bit instructions, so
// consecutive words sit two bytes apart; this memory ignores address bit 0
// and holds 2^ADDR_BITS words. With the default ADDR_BITS = 15 it covers the
// full 64 KiB address space. One port serves both instruction fetch and
// LW/SW (the processor never needs both in the same cycle). Writes happen
// at the rising edge when we = 1; reads are synchronous: rdata shows the
// word at the address presented in the previous cycle. The contents are
// not reset; a program is loaded before the processor leaves reset.
// Size, single-port organisation and read timing are implementation choices.
module memory #(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned ADDR_BITS = 15
) (
  input  logic             clk,
  input  logic [15:0]      addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  logic [ADDR_BITS-1:0] widx;
  assign widx = addr[ADDR_BITS:1];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
    rdata <= mem[widx];
  end

endmodule
