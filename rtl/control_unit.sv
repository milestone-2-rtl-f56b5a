// Control unit: multicycle sequencer and instruction decoder.
//
// Each instruction passes through up to four states:
//   S_FETCH  - if an enabled interrupt is pending, take it (IPC <- PC,
//              PC <- IAR[n]) and stay in S_FETCH; otherwise present PC to
//              memory.
//   S_LOADIR - IR <- memory word, PC <- PC + 2.
//   S_EXEC   - decode IR and do the whole instruction: register writes,
//              branch/jump PC updates, SW, port and IAR writes, EI changes.
//              LW instead presents its address to memory.
//   S_MEMWB  - LW only: write the loaded word to rd.
// So every instruction takes 3 clock cycles, LW takes 4, and taking an
// interrupt adds 1. The decode follows the opcode table and operand fields of
// the instruction set; the state sequence, cycle counts and encodings of the
// control word are choices of this implementation (the instruction set does
// not fix a microarchitecture). Unused opcodes (24..31) execute as no-ops.
// Interface: `op` is IR[15:11], `eq` is the rd == rs comparison,
// `int_pending` comes from the interrupt controller; `ctrl` is the control
// word for the datapath in the current cycle and `state` the current state.
module control_unit
  import euclid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] op,
  input  logic       eq,
  input  logic       int_pending,
  output ctrl_t      ctrl,
  output state_e     state
);

  state_e next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= next;
  end

  always_comb begin
    ctrl = CTRL_IDLE;
    next = state;
    unique case (state)
      S_FETCH: begin
        if (int_pending) begin
          ctrl.int_take = 1'b1;
          ctrl.pc_sel   = PC_IAR;
        end else begin
          next = S_LOADIR;
        end
      end
      S_LOADIR: begin
        ctrl.ir_we  = 1'b1;
        ctrl.pc_sel = PC_INC;
        next        = S_EXEC;
      end
      S_EXEC: begin
        next = S_FETCH;
        case (op)
          OP_ADD:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_ADD; end
          OP_SUB:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SUB; end
          OP_OR:   begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_OR;  end
          OP_AND:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_AND; end
          OP_ADDI: begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_ADD; ctrl.b_sel = B_SEXT; end
          OP_SUBI: begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SUB; ctrl.b_sel = B_SEXT; end
          OP_SL:   begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SL;  ctrl.b_sel = B_ZEXT; end
          OP_SR:   begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SR;  ctrl.b_sel = B_ZEXT; end
          OP_ORI:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_OR;  ctrl.b_sel = B_ZEXT; end
          OP_LUI:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_LUI; ctrl.b_sel = B_ZEXT; end
          OP_SLT:  begin
            ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SLT; ctrl.wa_sel = WA_F42;
          end
          OP_BEQ:  if (eq)  ctrl.pc_sel = PC_BRANCH;
          OP_BNE:  if (!eq) ctrl.pc_sel = PC_BRANCH;
          OP_JAL:  begin
            ctrl.pc_sel = PC_JUMP; ctrl.reg_we = 1'b1;
            ctrl.wa_sel = WA_RA;   ctrl.wd_sel = WD_PC;
          end
          OP_J:    ctrl.pc_sel = PC_JUMP;
          OP_JR:   ctrl.pc_sel = PC_JR;
          OP_SW:   begin ctrl.maddr_reg = 1'b1; ctrl.mem_we = 1'b1; end
          OP_LW:   begin ctrl.maddr_reg = 1'b1; next = S_MEMWB; end
          OP_ASSIGN:  ctrl.iar_we = 1'b1;
          OP_ASSIGNR: begin ctrl.iar_we = 1'b1; ctrl.iar_from_reg = 1'b1; end
          OP_TOGGLEI: ctrl.toggle_ei = 1'b1;
          OP_ENDI:    begin ctrl.endi = 1'b1; ctrl.pc_sel = PC_IPC; end
          OP_GETPORT: begin
            ctrl.reg_we = 1'b1; ctrl.wa_sel = WA_F75; ctrl.wd_sel = WD_PORT;
          end
          OP_SETPORT: ctrl.port_we = 1'b1;
          default: ;
        endcase
      end
      S_MEMWB: begin
        ctrl.reg_we = 1'b1;
        ctrl.wd_sel = WD_MEM;
        next        = S_FETCH;
      end
      default: next = S_FETCH;
    endcase
  end

endmodule
