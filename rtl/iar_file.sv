// Interrupt address register file (IAR0..IAR7).
//
// Holds, for each of the eight interrupt sources, the 16-bit address of its
// handler. ASSIGN and ASSIGNR write one entry through the synchronous write
// port; the asynchronous read port is addressed by the interrupt controller
// with the number of the interrupt being taken, so the handler address is
// ready in the same cycle. Reset clears all entries (implementation choice).
module iar_file #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned N     = 8,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] iar [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) iar[i] <= '0;
    end else if (we) begin
      iar[waddr] <= wdata;
    end
  end

  assign rdata = iar[raddr];

endmodule
