// I/O ports of the Euclid processor: IN0, IN1 (4 bits each) and OUT0 (16 bits).
//
// GETPORT reads a port into a register, SETPORT writes a register to a port.
// Port numbers: IN0 = 000, IN1 = 001, OUT0 = 011. Inputs are zero-extended
// to 16 bits when read. OUT0 is a register that only SETPORT with port 011
// changes; SETPORT to any other number is ignored, since input ports cannot
// be written. Reading OUT0 returns its current value and reading an unused
// port number returns zero (both implementation choices). Reads are
// combinational; OUT0 updates at the clock edge and resets to zero.
module io_ports
  import euclid_pkg::*;
#(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned IN_WIDTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [IN_WIDTH-1:0] in0,
  input  logic [IN_WIDTH-1:0] in1,
  output logic [WIDTH-1:0]    out0,
  input  logic [2:0]          rport,
  output logic [WIDTH-1:0]    rdata,
  input  logic                we,
  input  logic [2:0]          wport,
  input  logic [WIDTH-1:0]    wdata
);

  always_comb begin
    unique case (rport)
      PORT_IN0:  rdata = WIDTH'(in0);
      PORT_IN1:  rdata = WIDTH'(in1);
      PORT_OUT0: rdata = out0;
      default:   rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          out0 <= '0;
    else if (we && wport == PORT_OUT0)   out0 <= wdata;
  end

endmodule
