// Self-checking testbench for control_unit. For every opcode (0..31) and
// both values of the rd == rs comparison it steps one instruction through
// the sequencer and checks the state sequence, the cycle count (3 cycles,
// 4 for LW) and the control word fields that define the instruction's
// effect, against an expectation table written here from the instruction
// set. It also checks that a pending interrupt is taken in S_FETCH (one
// extra cycle) and that nothing is taken in the other states.
module control_unit_tb;
  import euclid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] op;
  logic eq, int_pending;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL op=%0d eq=%0d %s got %0d exp %0d", op, eq, what, got, exp);
    end
  endtask

  // Expected effect of the execute step.
  typedef struct {
    bit reg_we; int wa; int wd; int pc; bit mem_we; bit maddr;
    bit iar_we; bit iar_reg; bit tog; bit endi; bit port_we;
    int alu; int bsel; int cycles;
  } exp_t;

  function automatic exp_t expect_of(int o, bit e);
    exp_t x = '{reg_we: 0, wa: WA_F108, wd: WD_ALU, pc: PC_KEEP, mem_we: 0, maddr: 0,
                iar_we: 0, iar_reg: 0, tog: 0, endi: 0, port_we: 0,
                alu: -1, bsel: -1, cycles: 3};
    case (o)
      0:  begin x.reg_we = 1; x.alu = ALU_ADD; x.bsel = B_REG;  end
      1:  begin x.reg_we = 1; x.alu = ALU_SUB; x.bsel = B_REG;  end
      2:  begin x.reg_we = 1; x.alu = ALU_SL;  x.bsel = B_ZEXT; end
      3:  begin x.reg_we = 1; x.alu = ALU_SLT; x.bsel = B_REG; x.wa = WA_F42; end
      4:  x.pc = e ? PC_BRANCH : PC_KEEP;
      5:  x.pc = e ? PC_KEEP : PC_BRANCH;
      6:  begin x.pc = PC_JUMP; x.reg_we = 1; x.wa = WA_RA; x.wd = WD_PC; end
      7:  x.pc = PC_JUMP;
      8:  x.pc = PC_JR;
      9:  begin x.reg_we = 1; x.alu = ALU_OR;  x.bsel = B_ZEXT; end
      10: begin x.reg_we = 1; x.alu = ALU_LUI; x.bsel = B_ZEXT; end
      11: begin x.mem_we = 1; x.maddr = 1; end
      12: begin x.maddr = 1; x.cycles = 4; end
      13: x.iar_we = 1;
      14: x.tog = 1;
      15: begin x.endi = 1; x.pc = PC_IPC; end
      16: begin x.reg_we = 1; x.wa = WA_F75; x.wd = WD_PORT; end
      17: x.port_we = 1;
      18: begin x.iar_we = 1; x.iar_reg = 1; end
      19: begin x.reg_we = 1; x.alu = ALU_SR;  x.bsel = B_ZEXT; end
      20: begin x.reg_we = 1; x.alu = ALU_OR;  x.bsel = B_REG;  end
      21: begin x.reg_we = 1; x.alu = ALU_AND; x.bsel = B_REG;  end
      22: begin x.reg_we = 1; x.alu = ALU_ADD; x.bsel = B_SEXT; end
      23: begin x.reg_we = 1; x.alu = ALU_SUB; x.bsel = B_SEXT; end
      default: ;
    endcase
    return x;
  endfunction

  initial begin
    exp_t x;
    int cyc;
    op = 0; eq = 0; int_pending = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 32; o++) begin
      for (int e = 0; e < 2; e++) begin
        x = expect_of(o, e[0]);
        op = 5'(o); eq = e[0]; int_pending = 0;
        #1;
        // S_FETCH
        check("state fetch", state, S_FETCH);
        check("fetch int_take", ctrl.int_take, 0);
        check("fetch maddr", ctrl.maddr_reg, 0);
        cyc = 1;
        @(negedge clk);
        int_pending = 1;  // must be ignored outside S_FETCH
        check("state loadir", state, S_LOADIR);
        check("loadir ir_we", ctrl.ir_we, 1);
        check("loadir pc", ctrl.pc_sel, PC_INC);
        check("loadir int_take", ctrl.int_take, 0);
        cyc++;
        @(negedge clk);
        check("state exec", state, S_EXEC);
        check("reg_we", ctrl.reg_we, x.reg_we);
        if (x.reg_we) begin
          check("wa_sel", ctrl.wa_sel, x.wa);
          if (o != 12) check("wd_sel", ctrl.wd_sel, x.wd);
        end
        check("pc_sel", ctrl.pc_sel, x.pc);
        check("mem_we", ctrl.mem_we, x.mem_we);
        check("maddr_reg", ctrl.maddr_reg, x.maddr);
        check("iar_we", ctrl.iar_we, x.iar_we);
        if (x.iar_we) check("iar_from_reg", ctrl.iar_from_reg, x.iar_reg);
        check("toggle_ei", ctrl.toggle_ei, x.tog);
        check("endi", ctrl.endi, x.endi);
        check("port_we", ctrl.port_we, x.port_we);
        check("int_take", ctrl.int_take, 0);
        if (x.alu >= 0) check("alu_op", ctrl.alu_op, x.alu);
        if (x.bsel >= 0) check("b_sel", ctrl.b_sel, x.bsel);
        cyc++;
        @(negedge clk);
        if (state == S_MEMWB) begin
          check("memwb reg_we", ctrl.reg_we, 1);
          check("memwb wd_sel", ctrl.wd_sel, WD_MEM);
          check("memwb wa_sel", ctrl.wa_sel, WA_F108);
          cyc++;
          @(negedge clk);
        end
        check("cycles", cyc, x.cycles);
        // interrupt taken at the boundary
        int_pending = 1;
        #1;
        check("state fetch (int)", state, S_FETCH);
        check("int_take", ctrl.int_take, 1);
        check("int pc_sel", ctrl.pc_sel, PC_IAR);
        @(negedge clk);
        int_pending = 0;
        check("stay fetch after take", state, S_FETCH);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
