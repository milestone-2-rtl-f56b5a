// Self-checking testbench for iar_file: reset value, then random writes
// checked against a reference array through the read port.
module iar_file_tb;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [2:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [8];

  iar_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      model[i] = 0;
      raddr = 3'(i); #1;
      checks++;
      if (rdata !== 16'h0) begin failures++; $display("FAIL reset IAR%0d = %h", i, rdata); end
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 16'($urandom);
      raddr = 3'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++; $display("FAIL IAR%0d got %h exp %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
