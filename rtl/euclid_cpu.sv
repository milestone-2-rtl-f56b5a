// Euclid 16-bit processor core (without memory).
//
// Holds the special registers PC and IR and connects the register file, the
// ALU, the interrupt address registers, the interrupt controller (IntStatus,
// EI, IPC) and the I/O ports under the control unit's sequencing. Each
// instruction takes 3 cycles (LW 4); taking an interrupt costs one extra
// cycle at the instruction boundary (see control_unit).
//
// PC holds a byte address; instructions are 2 bytes apart. During S_EXEC
// PC already points at the next instruction (PC+2), so:
//   BEQ/BNE target = PC + 2*label5           (label counts instructions
//                                              forward from the next one)
//   J/JAL   target = {PC[15:12], addr11, 0}  (JAL writes PC into $ra)
//   JR      target = rd
//   ENDI    target = IPC
//   ASSIGN  writes IAR[rd field] <= {PC[15:8], imm8}
// The register read ports are always addressed by IR[10:8] (operand a,
// "rd") and IR[7:5] (operand b, "rs"); SLT writes IR[4:2], GETPORT writes
// IR[7:5], JAL writes $ra (code 0), everything else writes IR[10:8].
// The memory port is one synchronous-read port shared by fetch and LW/SW.
// Reset starts execution at address 0 with EI cleared.
module euclid_cpu
  import euclid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // memory
  output logic [15:0] mem_addr,
  output logic        mem_we,
  output logic [15:0] mem_wdata,
  input  logic [15:0] mem_rdata,
  // ports and interrupt requests
  input  logic [3:0]  in0,
  input  logic [3:0]  in1,
  output logic [15:0] out0,
  input  logic [7:0]  irq
);

  ctrl_t  ctrl;
  state_e state;

  word_t pc, ir;
  word_t a, b, alu_b, alu_y, wd, port_rdata, iar_rdata, iar_wdata, ipc;
  logic  eq, int_pending, ei;
  logic [2:0] int_sel;
  logic [7:0] int_status;
  regidx_t wa;

  regidx_t f108, f75, f42;
  logic [7:0]  imm8;
  logic [4:0]  label5;
  logic [10:0] addr11;

  assign f108   = ir[10:8];
  assign f75    = ir[7:5];
  assign f42    = ir[4:2];
  assign imm8   = ir[7:0];
  assign label5 = ir[4:0];
  assign addr11 = ir[10:0];

  control_unit u_ctrl (
    .clk, .rst_n, .op(ir[15:11]), .eq, .int_pending, .ctrl, .state
  );

  always_comb begin
    unique case (ctrl.wa_sel)
      WA_F108: wa = f108;
      WA_F75:  wa = f75;
      WA_F42:  wa = f42;
      default: wa = REG_RA;
    endcase
  end

  always_comb begin
    unique case (ctrl.wd_sel)
      WD_ALU:  wd = alu_y;
      WD_MEM:  wd = mem_rdata;
      WD_PORT: wd = port_rdata;
      default: wd = pc;
    endcase
  end

  regfile #(.WIDTH(XLEN), .NREGS(NREGS)) u_regs (
    .clk, .rst_n,
    .ra1(f108), .rd1(a),
    .ra2(f75),  .rd2(b),
    .we(ctrl.reg_we), .wa, .wd
  );

  always_comb begin
    unique case (ctrl.b_sel)
      B_SEXT:  alu_b = {{8{imm8[7]}}, imm8};
      B_ZEXT:  alu_b = {8'h00, imm8};
      default: alu_b = b;
    endcase
  end

  alu #(.WIDTH(XLEN)) u_alu (.op(ctrl.alu_op), .a, .b(alu_b), .y(alu_y));

  // BEQ / BNE compare the two register operands.
  assign eq = (a == b);

  assign iar_wdata = ctrl.iar_from_reg ? b : {pc[15:8], imm8};

  iar_file #(.WIDTH(XLEN), .N(NIAR)) u_iar (
    .clk, .rst_n,
    .we(ctrl.iar_we), .waddr(f108), .wdata(iar_wdata),
    .raddr(int_sel), .rdata(iar_rdata)
  );

  interrupt_ctrl #(.N(NIAR), .WIDTH(XLEN)) u_int (
    .clk, .rst_n, .irq,
    .take(ctrl.int_take), .pc,
    .toggle_ei(ctrl.toggle_ei), .endi(ctrl.endi),
    .pending(int_pending), .sel(int_sel), .ipc, .ei, .int_status
  );

  io_ports #(.WIDTH(XLEN), .IN_WIDTH(4)) u_ports (
    .clk, .rst_n, .in0, .in1, .out0,
    .rport(f108), .rdata(port_rdata),
    .we(ctrl.port_we), .wport(f108), .wdata(b)
  );

  // PC and IR
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      ir <= '0;
    end else begin
      if (ctrl.ir_we) ir <= mem_rdata;
      unique case (ctrl.pc_sel)
        PC_INC:    pc <= pc + 16'd2;
        PC_BRANCH: pc <= pc + {10'd0, label5, 1'b0};
        PC_JUMP:   pc <= {pc[15:12], addr11, 1'b0};
        PC_JR:     pc <= a;
        PC_IPC:    pc <= ipc;
        PC_IAR:    pc <= iar_rdata;
        default:   ;
      endcase
    end
  end

  assign mem_addr  = ctrl.maddr_reg ? b : pc;
  assign mem_we    = ctrl.mem_we;
  assign mem_wdata = a;

endmodule
