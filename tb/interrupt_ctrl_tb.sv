// Self-checking testbench for interrupt_ctrl. A cycle-accurate reference
// model of IntStatus, EI and IPC is stepped alongside the block under random
// requests, takes (only when pending, as the sequencer does), TOGGLEI and
// ENDI commands; pending, sel, IPC, EI and IntStatus are compared each cycle.
module interrupt_ctrl_tb;
  logic clk = 0, rst_n = 0;
  logic [7:0] irq;
  logic take, toggle_ei, endi;
  logic [15:0] pc, ipc;
  logic pending, ei;
  logic [2:0] sel;
  logic [7:0] int_status;
  int checks = 0, failures = 0;
  int n_taken = 0;

  logic [7:0] m_status;
  logic m_ei;
  logic [15:0] m_ipc;

  interrupt_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0h exp %0h", what, got, exp); end
  endtask

  function automatic int lowest(logic [7:0] v);
    for (int i = 0; i < 8; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    irq = 0; take = 0; toggle_ei = 0; endi = 0; pc = 0;
    m_status = 0; m_ei = 0; m_ipc = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // compare outputs with the model
      check("ei", ei, m_ei);
      check("int_status", int_status, m_status);
      check("ipc", ipc, m_ipc);
      check("pending", pending, m_ei && (m_status != 0));
      if (m_status != 0) check("sel", sel, lowest(m_status));
      // drive new inputs
      irq       = (($urandom % 8) == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
      pc        = 16'($urandom);
      take      = pending && ($urandom % 2 == 0);
      toggle_ei = !take && ($urandom % 6 == 0);
      endi      = !take && !toggle_ei && ($urandom % 10 == 0);
      @(posedge clk);
      if (take) begin
        m_ipc = pc;
        m_status = (m_status & ~(8'(1) << lowest(m_status))) | irq;
        m_ei = 0;
        n_taken++;
      end else begin
        m_status = m_status | irq;
        if (endi) m_ei = 1;
        else if (toggle_ei) m_ei = !m_ei;
      end
    end
    checks++;
    if (n_taken < 10) begin failures++; $display("FAIL only %0d interrupts taken", n_taken); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
