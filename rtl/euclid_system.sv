// Euclid processor system: the processor core and its unified memory.
//
// This is the complete design: a 16-bit, multicycle processor running the
// Euclid instruction set out of a 64 KiB (32 Ki-word) memory, with two
// 4-bit input ports, one 16-bit output port and eight interrupt request
// lines that set the bits of IntStatus. Execution starts at address 0 when
// rst_n is released; the program must be in memory by then (the memory is
// not reset; a testbench writes u_mem.mem directly).
module euclid_system #(
  parameter int unsigned MEM_ADDR_BITS = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  in0,
  input  logic [3:0]  in1,
  output logic [15:0] out0,
  input  logic [7:0]  irq
);

  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we;

  euclid_cpu u_cpu (
    .clk, .rst_n,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .in0, .in1, .out0, .irq
  );

  memory #(.WIDTH(16), .ADDR_BITS(MEM_ADDR_BITS)) u_mem (
    .clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata)
  );

endmodule
