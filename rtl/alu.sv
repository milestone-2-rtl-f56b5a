// Arithmetic-logic unit of the Euclid processor.
//
// Purely combinational. Operand a is always the rd register; operand b is
// the rs register or the 8-bit immediate (sign-extended for ADDI/SUBI,
// zero-extended for ORI, LUI and the shifts), selected outside this block.
//   ALU_ADD  a + b            ADD, ADDI
//   ALU_SUB  a - b            SUB, SUBI
//   ALU_SL   a << b[3:0]      SL  (only the low 4 immediate bits are used)
//   ALU_SR   a >> b[3:0]      SR  (logical shift: an implementation choice)
//   ALU_SLT  (a < b) ? 1 : 0  SLT (two's-complement compare: implementation choice)
//   ALU_OR   a | b            OR, ORI
//   ALU_AND  a & b            AND
//   ALU_LUI  {b[7:0], 8'h00}  LUI
// Arithmetic wraps modulo 2^16.
module alu
  import euclid_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_SL:  y = a << b[3:0];
      ALU_SR:  y = a >> b[3:0];
      ALU_SLT: y = {{(WIDTH-1){1'b0}}, ($signed(a) < $signed(b))};
      ALU_OR:  y = a | b;
      ALU_AND: y = a & b;
      ALU_LUI: y = {b[7:0], {(WIDTH-8){1'b0}}};
      default: y = '0;
    endcase
  end

endmodule
