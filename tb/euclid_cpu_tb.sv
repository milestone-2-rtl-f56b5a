// Self-checking testbench for euclid_cpu: lockstep comparison against an
// instruction-set reference model.
//
// The whole 64 KiB memory (a model in this testbench with the same
// synchronous-read timing as the memory block) is filled with random
// instruction words, so every jump, branch, JR or ENDI lands on code, and
// every opcode, including unused ones, is executed many times. Random
// pulses on the interrupt request lines exercise interrupt entry. The
// reference model keeps its own copy of memory and of all architectural
// state (registers, PC, IAR0..7, IntStatus, EI, IPC, OUT0); at every
// instruction boundary the processor's state is compared with it. The
// number of cycles per instruction (3, LW 4, +1 for taking an interrupt) is
// checked too.
module euclid_cpu_tb;
  import euclid_pkg::*;

  localparam int NINSTR   = 40000;
  localparam int NEPISODE = 40;

  logic clk = 0, rst_n = 0;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, out0;
  logic mem_we;
  logic [3:0] in0, in1;
  logic [7:0] irq;

  euclid_cpu dut (.*);

  // memory model
  logic [15:0] tmem [32768];
  always_ff @(posedge clk) begin
    if (mem_we) tmem[mem_addr[15:1]] <= mem_wdata;
    mem_rdata <= tmem[mem_addr[15:1]];
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_instr = 0, n_int = 0, n_lw = 0, n_endi = 0, n_jump = 0, n_br = 0;
  int cycles = 0, last_start = 0, exp_len = 0;
  bit started = 0;

  initial begin
    repeat (NINSTR * 6 + 100 * NEPISODE) @(posedge clk);
    failures++;
    $display("watchdog: stopped after %0d instructions", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic [15:0] m_mem [32768];
  logic [15:0] m_regs [8];
  logic [15:0] m_iar [8];
  logic [15:0] m_pc, m_ipc, m_out;
  logic [7:0]  m_status;
  logic        m_ei;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL after %0d instr: %s got %h exp %h", n_instr, what, got, exp);
    end
  endtask

  function automatic int sgn(logic [15:0] v);
    return v[15] ? int'(v) - 65536 : int'(v);
  endfunction

  // Execute one instruction of the reference model.
  task automatic iss_step();
    logic [15:0] ins, npc, a, b, wv;
    int op, fa, fb, fc, imm, sh;
    bit wr;
    int wreg;
    ins = m_mem[m_pc[15:1]];
    op = int'(ins[15:11]); fa = int'(ins[10:8]); fb = int'(ins[7:5]); fc = int'(ins[4:2]);
    imm = int'(ins[7:0]);
    npc = m_pc + 16'd2;
    a = m_regs[fa]; b = m_regs[fb];
    wr = 1; wreg = fa; wv = 0;
    sh = imm % 16;
    case (op)
      0:  wv = 16'(int'(a) + int'(b));
      1:  wv = 16'(int'(a) - int'(b));
      2:  wv = 16'(int'(a) * (1 << sh));
      19: wv = 16'(int'(a) / (1 << sh));
      3:  begin wv = (sgn(a) < sgn(b)) ? 16'd1 : 16'd0; wreg = fc; end
      4:  begin wr = 0; if (a == b) npc = npc + 16'(2 * int'(ins[4:0])); n_br++; end
      5:  begin wr = 0; if (a != b) npc = npc + 16'(2 * int'(ins[4:0])); n_br++; end
      6:  begin wreg = 0; wv = npc; npc = {npc[15:12], ins[10:0], 1'b0}; n_jump++; end
      7:  begin wr = 0; npc = {npc[15:12], ins[10:0], 1'b0}; n_jump++; end
      8:  begin wr = 0; npc = a; n_jump++; end
      9:  wv = a | 16'(imm);
      10: wv = 16'(imm * 256);
      11: begin wr = 0; m_mem[b[15:1]] = a; end
      12: begin wv = m_mem[b[15:1]]; n_lw++; end
      13: begin wr = 0; m_iar[fa] = {npc[15:8], ins[7:0]}; end
      14: begin wr = 0; m_ei = !m_ei; end
      15: begin wr = 0; npc = m_ipc; m_ei = 1; n_endi++; end
      16: begin
        wreg = fb;
        case (fa)
          0: wv = 16'(in0);
          1: wv = 16'(in1);
          3: wv = m_out;
          default: wv = 0;
        endcase
      end
      17: begin wr = 0; if (fa == 3) m_out = b; end
      18: begin wr = 0; m_iar[fa] = b; end
      20: wv = a | b;
      21: wv = a & b;
      22: wv = 16'(int'(a) + sgn({{8{ins[7]}}, ins[7:0]}));
      23: wv = 16'(int'(a) - sgn({{8{ins[7]}}, ins[7:0]}));
      default: wr = 0;
    endcase
    if (wr) m_regs[wreg] = wv;
    m_pc = npc;
    exp_len = (op == 12) ? 4 : 3;
  endtask

  task automatic compare_state();
    for (int i = 0; i < 8; i++) check($sformatf("reg %0d", i), dut.u_regs.regs[i], m_regs[i]);
    for (int i = 0; i < 8; i++) check($sformatf("IAR%0d", i), dut.u_iar.iar[i], m_iar[i]);
    check("PC", dut.pc, m_pc);
    check("EI", dut.u_int.ei, m_ei);
    check("IPC", dut.u_int.ipc, m_ipc);
    check("IntStatus", dut.u_int.int_status, m_status);
    check("OUT0", out0, m_out);
  endtask

  function automatic int lowest(logic [7:0] v);
    for (int i = 0; i < 8; i++) if (v[i]) return i;
    return 0;
  endfunction

  // Cycle-by-cycle tracking: instruction semantics are applied when the
  // processor executes; IntStatus follows the request lines every cycle.
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      unique case (dut.state)
        S_FETCH: begin
          compare_state();
          if (m_ei && m_status != 0) begin
            check("int_take", dut.ctrl.int_take, 1);
            m_ipc = m_pc;
            m_pc = m_iar[lowest(m_status)];
            m_status[lowest(m_status)] = 1'b0;
            m_ei = 0;
            n_int++;
            exp_len++;
          end else begin
            check("no int_take", dut.ctrl.int_take, 0);
          end
        end
        S_LOADIR: begin
          if (started) check("cycles per instruction", cycles - last_start, exp_len);
          started = 1;
          last_start = cycles;
        end
        S_EXEC: begin
          iss_step();
          n_instr++;
        end
        default: ;
      endcase
      m_status = m_status | irq;
    end
  end

  // One episode: fresh random memory, reset, then NINSTR/NEPISODE
  // instructions. Short episodes keep random code from settling in a loop.
  task automatic episode();
    int stop_at;
    rst_n = 0;
    irq = 0;
    // Random code. J/JAL never target their own address, and JR, the
    // one instruction that can still spin in place, is made rarer.
    for (int i = 0; i < 32768; i++) begin
      logic [15:0] w;
      do begin
        w = 16'($urandom);
        if (w[15:11] == 5'd8 && ($urandom % 4) != 0) w[15:11] = 5'd22;
      end while ((w[15:11] == 5'd6 || w[15:11] == 5'd7) && w[10:0] == 11'(i));
      tmem[i] = w;
      m_mem[i] = w;
    end
    for (int i = 0; i < 8; i++) begin m_regs[i] = 0; m_iar[i] = 0; end
    m_pc = 0; m_ipc = 0; m_out = 0; m_status = 0; m_ei = 0;
    started = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    stop_at = n_instr + NINSTR / NEPISODE;
    while (n_instr < stop_at) begin
      @(negedge clk);
      irq = (($urandom % 20) == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
      in0 = 4'($urandom); in1 = 4'($urandom);
    end
    irq = 0;
    wait (dut.state == S_FETCH);
    @(negedge clk);
  endtask

  initial begin
    irq = 0; in0 = 4'h9; in1 = 4'h6;
    for (int e = 0; e < NEPISODE; e++) episode();
    $display("instructions %0d, interrupts %0d, LW %0d, ENDI %0d, jumps %0d, branches %0d",
             n_instr, n_int, n_lw, n_endi, n_jump, n_br);
    checks++;
    if (n_int < 100 || n_lw < 100 || n_endi < 100 || n_jump < 100 || n_br < 100) begin
      failures++; $display("FAIL too few interrupts, loads or returns exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
