// Interrupt controller: IntStatus, EI and IPC.
//
// IntStatus is an 8-bit register with one bit per interrupt source. A pulse
// on irq[i] sets bit i; the bit stays set until the interrupt is taken. When
// EI (Enable Interrupt) is 1 and any IntStatus bit is set, `pending` is
// raised and `sel` names the lowest-numbered set bit (fixed priority, an
// implementation choice); the processor reads IAR[sel] as the new PC.
// When the sequencer asserts `take` (at an instruction boundary), IPC
// captures the PC of the next instruction, the taken IntStatus bit is
// cleared and EI is cleared so the handler runs uninterrupted (clearing EI
// is an implementation choice consistent with ENDI re-setting it).
// `toggle_ei` (TOGGLEI) inverts EI; `endi` (ENDI) sets EI to 1 while the
// processor loads PC from IPC. Reset clears IntStatus, EI and IPC.
// A request that arrives in the same cycle its bit is cleared is kept.
module interrupt_ctrl #(
  parameter int unsigned N     = 8,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     irq,
  input  logic             take,
  input  logic [WIDTH-1:0] pc,
  input  logic             toggle_ei,
  input  logic             endi,
  output logic             pending,
  output logic [AW-1:0]    sel,
  output logic [WIDTH-1:0] ipc,
  output logic             ei,
  output logic [N-1:0]     int_status
);

  always_comb begin
    sel = '0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (int_status[i]) sel = AW'(i);
    end
  end

  assign pending = ei && (int_status != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_status <= '0;
      ei         <= 1'b0;
      ipc        <= '0;
    end else begin
      if (take) begin
        ipc        <= pc;
        int_status <= (int_status & ~(N'(1) << sel)) | irq;
        ei         <= 1'b0;
      end else begin
        int_status <= int_status | irq;
        if (endi)           ei <= 1'b1;
        else if (toggle_ei) ei <= ~ei;
      end
    end
  end

  // An interrupt may only be taken while one is pending (during reset
  // neither can be true, since EI is cleared).
  a_take_pending: assert property (@(posedge clk) take |-> pending);

endmodule
