// Self-checking testbench for regfile: checks the reset value, then random
// writes against a reference array, reading both ports every cycle.
module regfile_tb;
  logic clk = 0, rst_n = 0;
  logic [2:0] ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic we;
  int checks = 0, failures = 0;
  logic [15:0] model [8];

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      model[i] = 0;
      ra1 = 3'(i); ra2 = 3'(7 - i); #1;
      check("reset rd1", rd1, 16'h0);
      check("reset rd2", rd2, 16'h0);
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 3'($urandom);
      wd = 16'($urandom);
      ra1 = 3'($urandom); ra2 = 3'($urandom);
      #1;
      check("rd1", rd1, model[ra1]);
      check("rd2", rd2, model[ra2]);
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
