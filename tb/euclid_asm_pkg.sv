// Instruction encoders for testbenches of the Euclid processor.
// Each function returns one 16-bit instruction word built from the fields
// of the instruction formats (opcode in [15:11]).
package euclid_asm_pkg;
  import euclid_pkg::*;

  function automatic logic [15:0] r_type(opcode_e op, int rd, int rs, int rt = 0);
    return {op, 3'(rd), 3'(rs), 3'(rt), 2'b00};
  endfunction

  function automatic logic [15:0] i_type(opcode_e op, int rd, int imm);
    return {op, 3'(rd), 8'(imm)};
  endfunction

  function automatic logic [15:0] b_type(opcode_e op, int rd, int rs, int label);
    return {op, 3'(rd), 3'(rs), 5'(label)};
  endfunction

  // J / JAL: the field holds bits 11..1 of the target byte address.
  function automatic logic [15:0] j_type(opcode_e op, int target);
    return {op, 11'(target >> 1)};
  endfunction
endpackage
