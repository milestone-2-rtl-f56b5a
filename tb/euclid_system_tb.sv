// End-to-end testbench for euclid_system at its default size.
//
// Part 1 runs the call/return sample program (JAL, ADD, SUB, JR) from its
// binary encoding and checks the final registers and that it reaches its
// exit point after exactly 7 instructions (21 cycles).
// Part 2 runs a larger program built around Euclid's algorithm:
//   * installs two interrupt handlers, one with ASSIGN (address in the
//     current 256-byte page) and one with ASSIGNR (full 16-bit address),
//     and enables interrupts with TOGGLEI;
//   * computes gcd(a, b) by repeated subtraction for a table of pairs in
//     memory (LW), storing each result (SW), with a subroutine called by JAL
//     and left by JR, forward BEQ/BNE and backward J loops, SLT;
//   * computes gcd(IN0, IN1) from the input ports (GETPORT) and writes it
//     to OUT0 (SETPORT);
//   * leaves through the long-branch idiom (inverted branch + LUI/ORI/JR) to
//     code at 0x2000 that exercises SL, SR, AND, OR, ADDI, SUBI and writes a
//     final value to OUT0.
// Meanwhile the testbench pulses interrupt lines 2 and 5; each handler
// increments its own counter in memory (LW/ADDI/SW) and returns with ENDI.
// Results, counters and OUT0 values are checked against values computed
// here, and every opcode and mechanism (interrupt entry on both lines,
// taken and untaken BEQ/BNE, long branch) must have occurred.
module euclid_system_tb;
  import euclid_pkg::*;
  import euclid_asm_pkg::*;

  localparam int NP = 12;  // gcd pairs in the memory table

  logic clk = 0, rst_n = 0;
  logic [3:0] in0, in1;
  logic [15:0] out0;
  logic [7:0] irq;

  euclid_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic int gcd(int a, int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction

  task automatic put(int byte_addr, logic [15:0] w);
    dut.u_mem.mem[byte_addr / 2] = w;
  endtask

  // ---- mechanism counters, sampled in the execute state ----
  int op_count [32];
  int n_int2 = 0, n_int5 = 0, n_beq_t = 0, n_beq_n = 0, n_bne_t = 0, n_bne_n = 0;
  int n_long = 0, cycles = 0;
  logic [15:0] out_log [$];

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (dut.u_cpu.state == S_EXEC) begin
        op_count[dut.u_cpu.ir[15:11]]++;
        case (dut.u_cpu.ir[15:11])
          OP_BEQ: if (dut.u_cpu.eq) n_beq_t++; else n_beq_n++;
          OP_BNE: if (!dut.u_cpu.eq) n_bne_t++; else n_bne_n++;
          OP_JR:  if (dut.u_cpu.a == 16'h2000) n_long++;
          default: ;
        endcase
      end
      if (dut.u_cpu.ctrl.int_take) begin
        if (dut.u_cpu.int_sel == 3'd2) n_int2++;
        if (dut.u_cpu.int_sel == 3'd5) n_int5++;
      end
    end
  end

  always @(out0) if (rst_n) out_log.push_back(out0);

  // ---- part 1: the sample program ----
  task automatic sample_program();
    int c0;
    logic [15:0] words [8] = '{16'h3002, 16'h3801, 16'h0200, 16'h3007,
                               16'h0800, 16'h0040, 16'h4000, 16'h4000};
    // the encoders must agree with the listed binary
    check("enc JAL point1", j_type(OP_JAL, 4), words[0]);
    check("enc ADD g2,ra", r_type(OP_ADD, 2, 0), words[2]);
    check("enc JAL point2", j_type(OP_JAL, 14), words[3]);
    check("enc SUB ra,ra", r_type(OP_SUB, 0, 0), words[4]);
    check("enc ADD ra,g2", r_type(OP_ADD, 0, 2), words[5]);
    check("enc JR ra", r_type(OP_JR, 0, 0), words[6]);
    for (int i = 0; i < 8; i++) put(2 * i, words[i]);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c0 = cycles;
    // exit point: address 2 (J to itself)
    while (!(dut.u_cpu.pc == 16'h0002 && dut.u_cpu.state == S_FETCH)) @(negedge clk);
    check("sample: cycles to exit", cycles - c0, 21);
    check("sample: $ra", dut.u_cpu.u_regs.regs[0], 16'h0002);
    check("sample: $g2", dut.u_cpu.u_regs.regs[2], 16'h0002);
    repeat (10) @(negedge clk);
    check("sample: stays at exit", dut.u_cpu.pc >= 16'h0002 && dut.u_cpu.pc <= 16'h0004, 1);
  endtask

  // ---- part 2: gcd program with interrupts ----
  task automatic gcd_program();
    int pa [NP], pb [NP];
    int a = 0;
    int sent2 = 0, sent5 = 0;
    int gap;
    for (int i = 0; i < 32768; i++) dut.u_mem.mem[i] = 16'h0;
    // main
    put(a, i_type(OP_ASSIGN, 2, 'h80));  a += 2;    // IAR2 <- 0x0080
    put(a, i_type(OP_LUI, 1, 'h12));     a += 2;
    put(a, i_type(OP_ORI, 1, 'h00));     a += 2;
    put(a, r_type(OP_ASSIGNR, 5, 1));     a += 2;    // IAR5 <- 0x1200
    put(a, r_type(OP_TOGGLEI, 0, 0));     a += 2;    // EI <- 1
    put(a, i_type(OP_LUI, 1, 'h30));     a += 2;    // g1 = 0x3000
    check("loop address", a, 'h000C);
    put(a, r_type(OP_LW, 2, 1));          a += 2;    // g2 = mem[g1]
    put(a, i_type(OP_ADDI, 1, 2));        a += 2;
    put(a, r_type(OP_LW, 3, 1));          a += 2;    // g3 = mem[g1]
    put(a, i_type(OP_ADDI, 1, 2));        a += 2;
    put(a, j_type(OP_JAL, 'h0100));     a += 2;    // g6 = gcd(g2, g3)
    put(a, i_type(OP_LUI, 7, 'h01));     a += 2;
    put(a, r_type(OP_ADD, 7, 1));         a += 2;    // g7 = g1 + 0x100
    put(a, r_type(OP_SW, 6, 7));          a += 2;    // mem[g7] = g6
    put(a, i_type(OP_LUI, 7, 'h30));     a += 2;
    put(a, i_type(OP_ORI, 7, 4 * NP));    a += 2;    // g7 = end of table
    put(a, b_type(OP_BEQ, 1, 7, 1));      a += 2;    // done -> skip the J
    put(a, j_type(OP_J, 'h000C));       a += 2;
    put(a, r_type(OP_GETPORT, 0, 2));     a += 2;    // g2 = IN0
    put(a, r_type(OP_GETPORT, 1, 3));     a += 2;    // g3 = IN1
    put(a, j_type(OP_JAL, 'h0100));     a += 2;
    put(a, r_type(OP_SETPORT, 3, 6));     a += 2;    // OUT0 = g6
    put(a, b_type(OP_BNE, 7, 7, 3));      a += 2;    // long branch to 0x2000
    put(a, i_type(OP_LUI, 1, 'h20));     a += 2;
    put(a, i_type(OP_ORI, 1, 'h00));     a += 2;
    put(a, r_type(OP_JR, 1, 0));          a += 2;
    put(a, j_type(OP_J, a));              a += 2;    // not reached
    // interrupt handler 2 at 0x0080: counter at 0x4000
    a = 'h0080;
    put(a, i_type(OP_LUI, 4, 'h40));     a += 2;
    put(a, r_type(OP_LW, 5, 4));          a += 2;
    put(a, i_type(OP_ADDI, 5, 1));        a += 2;
    put(a, r_type(OP_SW, 5, 4));          a += 2;
    put(a, r_type(OP_ENDI, 0, 0));        a += 2;
    // gcd(g2, g3) -> g6, by subtraction; uses g6, g7
    a = 'h0100;
    put(a, r_type(OP_SUB, 7, 7));         a += 2;    // g7 = 0
    put(a, b_type(OP_BEQ, 2, 3, 6));      a += 2;    // 0x0102: equal -> done
    put(a, r_type(OP_SLT, 2, 3, 6));      a += 2;    // g6 = g2 < g3
    put(a, b_type(OP_BNE, 6, 7, 2));      a += 2;    // -> less
    put(a, r_type(OP_SUB, 2, 3));         a += 2;
    put(a, j_type(OP_J, 'h0102));       a += 2;
    put(a, r_type(OP_SUB, 3, 2));         a += 2;    // less:
    put(a, j_type(OP_J, 'h0102));       a += 2;
    check("done address", a, 'h0110);
    put(a, r_type(OP_SUB, 6, 6));         a += 2;    // done:
    put(a, r_type(OP_ADD, 6, 2));         a += 2;
    put(a, r_type(OP_JR, 0, 0));          a += 2;
    // interrupt handler 5 at 0x1200: counter at 0x4002
    a = 'h1200;
    put(a, i_type(OP_LUI, 4, 'h40));     a += 2;
    put(a, i_type(OP_ORI, 4, 'h02));     a += 2;
    put(a, r_type(OP_LW, 5, 4));          a += 2;
    put(a, i_type(OP_ADDI, 5, 1));        a += 2;
    put(a, r_type(OP_SW, 5, 4));          a += 2;
    put(a, r_type(OP_ENDI, 0, 0));        a += 2;
    // final code at 0x2000
    a = 'h2000;
    put(a, i_type(OP_LUI, 2, 'h12));     a += 2;
    put(a, i_type(OP_ORI, 2, 'h34));     a += 2;    // 0x1234
    put(a, i_type(OP_SL, 2, 4));          a += 2;    // 0x2340
    put(a, i_type(OP_SR, 2, 8));          a += 2;    // 0x0023
    put(a, i_type(OP_LUI, 3, 'h00));     a += 2;
    put(a, i_type(OP_ORI, 3, 'h0F));     a += 2;
    put(a, r_type(OP_AND, 3, 2));         a += 2;    // 0x0003
    put(a, i_type(OP_LUI, 6, 'h50));     a += 2;
    put(a, r_type(OP_OR, 6, 3));          a += 2;    // 0x5003
    put(a, i_type(OP_SUBI, 6, 3));        a += 2;    // 0x5000
    put(a, i_type(OP_ADDI, 6, -1));       a += 2;    // 0x4FFF
    put(a, r_type(OP_SETPORT, 3, 6));     a += 2;
    put(a, j_type(OP_J, a));              a += 2;    // halt
    // data table
    for (int k = 0; k < NP; k++) begin
      int g = 1 + int'($urandom % 12);
      pa[k] = g * (1 + int'($urandom % 40));
      pb[k] = (k == 0) ? pa[k] : g * (1 + int'($urandom % 40));
      put('h3000 + 4 * k, 16'(pa[k]));
      put('h3002 + 4 * k, 16'(pb[k]));
    end
    in0 = 4'd12; in1 = 4'd9;
    out_log.delete();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    // interrupt pulses until the program has finished
    while (out0 != 16'h4FFF) begin
      gap = 150 + int'($urandom % 200);
      for (int i = 0; i < gap && out0 != 16'h4FFF; i++) @(negedge clk);
      if (out0 == 16'h4FFF) break;
      if ($urandom % 2 == 0) begin irq = 8'b0000_0100; sent2++; end
      else                   begin irq = 8'b0010_0000; sent5++; end
      @(negedge clk);
      irq = 8'h00;
    end
    repeat (100) @(negedge clk);
    for (int k = 0; k < NP; k++)
      check($sformatf("gcd(%0d,%0d)", pa[k], pb[k]),
            dut.u_mem.mem[('h3104 + 4 * k) / 2], gcd(pa[k], pb[k]));
    check("counter line 2", dut.u_mem.mem[16'h4000 / 2], sent2);
    check("counter line 5", dut.u_mem.mem[16'h4002 / 2], sent5);
    check("interrupts taken on line 2", n_int2, sent2);
    check("interrupts taken on line 5", n_int5, sent5);
    check("OUT0 writes", out_log.size(), 2);
    if (out_log.size() == 2) begin
      check("OUT0 = gcd(IN0, IN1)", out_log[0], gcd(12, 9));
      check("OUT0 final", out_log[1], 16'h4FFF);
    end
    check("IAR2", dut.u_cpu.u_iar.iar[2], 16'h0080);
    check("IAR5", dut.u_cpu.u_iar.iar[5], 16'h1200);
    check("EI after returns", dut.u_cpu.u_int.ei, 1);
  endtask

  initial begin
    irq = 0; in0 = 0; in1 = 0;
    for (int i = 0; i < 32; i++) op_count[i] = 0;
    sample_program();
    gcd_program();
    // every instruction and mechanism must have happened
    for (int o = 0; o <= 23; o++) begin
      checks++;
      if (op_count[o] == 0) begin
        failures++; $display("FAIL opcode %s never executed", opcode_e'(o));
      end
    end
    $display("interrupts: line2 %0d line5 %0d; BEQ taken %0d not %0d; BNE taken %0d not %0d; long branch %0d; LW %0d",
             n_int2, n_int5, n_beq_t, n_beq_n, n_bne_t, n_bne_n, n_long, op_count[OP_LW]);
    check("some interrupt on line 2", n_int2 > 0, 1);
    check("some interrupt on line 5", n_int5 > 0, 1);
    check("BEQ taken", n_beq_t > 0, 1);
    check("BEQ not taken", n_beq_n > 0, 1);
    check("BNE taken", n_bne_t > 0, 1);
    check("BNE not taken", n_bne_n > 0, 1);
    check("long branch", n_long, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
