// Self-checking testbench for io_ports: reads of IN0/IN1/OUT0/unused port
// numbers and SETPORT writes to every port number; only port 011 may change
// OUT0.
module io_ports_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] in0, in1;
  logic [15:0] out0, rdata, wdata;
  logic [2:0] rport, wport;
  logic we;
  int checks = 0, failures = 0;
  logic [15:0] m_out;

  io_ports dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    in0 = 0; in1 = 0; rport = 0; wport = 0; we = 0; wdata = 0; m_out = 0;
    #12 rst_n = 1;
    check("out0 after reset", out0, 16'h0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in0 = 4'($urandom); in1 = 4'($urandom);
      rport = 3'($urandom);
      we = 1'($urandom); wport = 3'($urandom); wdata = 16'($urandom);
      #1;
      case (rport)
        3'b000:  check("IN0", rdata, {12'h0, in0});
        3'b001:  check("IN1", rdata, {12'h0, in1});
        3'b011:  check("OUT0 readback", rdata, m_out);
        default: check("unused port", rdata, 16'h0);
      endcase
      @(posedge clk);
      if (we && wport == 3'b011) m_out = wdata;
      #1 check("OUT0", out0, m_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
