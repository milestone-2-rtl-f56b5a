// General-purpose register file of the Euclid processor.
//
// Eight 16-bit registers: code 0 is the return-address register $ra, codes
// 1..7 are $g1..$g7. All eight are ordinary read/write registers ($ra is
// written by JAL and may also be the destination of any other instruction).
// Two asynchronous read ports serve the rd and rs fields of an instruction;
// one synchronous write port updates a register at the rising clock edge.
// Reset clears every register to zero (a choice of this implementation).
module regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

endmodule
