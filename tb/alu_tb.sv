// Self-checking testbench for alu: every operation on corner values and
// random operands, compared with results computed here from integers.
module alu_tb;
  import euclid_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;

  alu dut (.op, .a, .b, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_y(alu_op_e o, logic [15:0] x, logic [15:0] z);
    int sx, sz, sh;
    sx = (x >= 16'h8000) ? int'(x) - 65536 : int'(x);
    sz = (z >= 16'h8000) ? int'(z) - 65536 : int'(z);
    sh = int'(z) % 16;
    case (o)
      ALU_ADD: return 16'((int'(x) + int'(z)) % 65536);
      ALU_SUB: return 16'((int'(x) - int'(z) + 65536) % 65536);
      ALU_SL:  return 16'((int'(x) * (1 << sh)) % 65536);
      ALU_SR:  return 16'(int'(x) / (1 << sh));
      ALU_SLT: return (sx < sz) ? 16'd1 : 16'd0;
      ALU_OR:  return x | z;
      ALU_AND: return x & z;
      ALU_LUI: return 16'((int'(z) % 256) * 256);
      default: return 16'h0;
    endcase
  endfunction

  task automatic try(alu_op_e o, logic [15:0] x, logic [15:0] z);
    logic [15:0] e;
    op = o; a = x; b = z; #1;
    e = ref_y(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, e);
    end
  endtask

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h00ff};

  initial begin
    for (int o = 0; o < 8; o++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) try(alu_op_e'(o), CORNER[i], CORNER[j]);
    for (int n = 0; n < 4000; n++) try(alu_op_e'($urandom % 8), 16'($urandom), 16'($urandom));
    // shift amounts 0..15 with immediate-style operands
    for (int s = 0; s < 16; s++) begin
      try(ALU_SL, 16'hb6d3, 16'(s));
      try(ALU_SR, 16'hb6d3, 16'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
