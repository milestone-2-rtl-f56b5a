// Shared types and constants of the Euclid 16-bit processor.
//
// Every instruction is one 16-bit word. The 5-bit opcode sits in bits
// [15:11]; the remaining 11 bits are split three ways depending on format:
//   R-type : rd [10:8] | rs [7:5] | rt [4:2] | unused [1:0]
//   I-type : rd [10:8] | imm8 [7:0]
//   B-type : rd [10:8] | rs [7:5] | label5 [4:0]   (BEQ / BNE)
//   J-type : addr11 [10:0]                          (J / JAL)
// Opcode numbers, field positions and port numbers follow the ISA definition.
// The ALU operation codes, the control-word layout and the sequencer states
// are choices of this implementation.
package euclid_pkg;

  localparam int unsigned XLEN  = 16;  // data and address width
  localparam int unsigned NREGS = 8;   // $ra + $g1..$g7
  localparam int unsigned NIAR  = 8;   // IAR0..IAR7 and IntStatus bits

  typedef logic [XLEN-1:0] word_t;
  typedef logic [2:0]      regidx_t;

  // Register code 0 is the return address register $ra.
  localparam regidx_t REG_RA = 3'd0;

  // Port numbers of GETPORT / SETPORT.
  localparam logic [2:0] PORT_IN0  = 3'b000;
  localparam logic [2:0] PORT_IN1  = 3'b001;
  localparam logic [2:0] PORT_OUT0 = 3'b011;

  typedef enum logic [4:0] {
    OP_ADD     = 5'd0,
    OP_SUB     = 5'd1,
    OP_SL      = 5'd2,
    OP_SLT     = 5'd3,
    OP_BEQ     = 5'd4,
    OP_BNE     = 5'd5,
    OP_JAL     = 5'd6,
    OP_J       = 5'd7,
    OP_JR      = 5'd8,
    OP_ORI     = 5'd9,
    OP_LUI     = 5'd10,
    OP_SW      = 5'd11,
    OP_LW      = 5'd12,
    OP_ASSIGN  = 5'd13,
    OP_TOGGLEI = 5'd14,
    OP_ENDI    = 5'd15,
    OP_GETPORT = 5'd16,
    OP_SETPORT = 5'd17,
    OP_ASSIGNR = 5'd18,
    OP_SR      = 5'd19,
    OP_OR      = 5'd20,
    OP_AND     = 5'd21,
    OP_ADDI    = 5'd22,
    OP_SUBI    = 5'd23
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SL, ALU_SR, ALU_SLT, ALU_OR, ALU_AND, ALU_LUI
  } alu_op_e;

  // Multicycle sequencer states.
  typedef enum logic [1:0] {
    S_FETCH  = 2'd0,  // take an interrupt, or send PC to memory
    S_LOADIR = 2'd1,  // IR <- memory word, PC <- PC + 2
    S_EXEC   = 2'd2,  // execute; LW sends its address to memory
    S_MEMWB  = 2'd3   // LW only: rd <- memory word
  } state_e;

  typedef enum logic [2:0] {
    PC_KEEP, PC_INC, PC_BRANCH, PC_JUMP, PC_JR, PC_IPC, PC_IAR
  } pc_sel_e;

  typedef enum logic [1:0] {WA_F108, WA_F75, WA_F42, WA_RA} wa_sel_e;
  typedef enum logic [1:0] {WD_ALU, WD_MEM, WD_PORT, WD_PC} wd_sel_e;
  typedef enum logic [1:0] {B_REG, B_SEXT, B_ZEXT} b_sel_e;

  typedef struct packed {
    logic    ir_we;
    pc_sel_e pc_sel;
    logic    maddr_reg;   // 1: memory address from register rs, 0: from PC
    logic    mem_we;
    logic    reg_we;
    wa_sel_e wa_sel;
    wd_sel_e wd_sel;
    alu_op_e alu_op;
    b_sel_e  b_sel;
    logic    iar_we;
    logic    iar_from_reg; // 1: ASSIGNR (register), 0: ASSIGN ({PC[15:8], imm8})
    logic    int_take;
    logic    toggle_ei;
    logic    endi;
    logic    port_we;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    ir_we: 1'b0, pc_sel: PC_KEEP, maddr_reg: 1'b0, mem_we: 1'b0,
    reg_we: 1'b0, wa_sel: WA_F108, wd_sel: WD_ALU, alu_op: ALU_ADD,
    b_sel: B_REG, iar_we: 1'b0, iar_from_reg: 1'b0, int_take: 1'b0,
    toggle_ei: 1'b0, endi: 1'b0, port_we: 1'b0};

endpackage
