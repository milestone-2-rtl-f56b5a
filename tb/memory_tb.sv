// Self-checking testbench for memory at its full 32 Ki-word size: random
// writes and reads over the whole address space against a sparse reference,
// checking the one-cycle read latency and that address bit 0 is ignored.
module memory_tb;
  logic clk = 0;
  logic [15:0] addr, wdata, rdata;
  logic we;
  int checks = 0, failures = 0;
  logic [15:0] model [int];

  memory dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widx, last_idx;
    logic last_read;
    we = 0; addr = 0; wdata = 0; last_read = 0; last_idx = 0;
    // write a block of known words first
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      widx = (i * 131) % 32768;
      addr = 16'(widx * 2 + (i % 2)); we = 1; wdata = 16'($urandom);
      model[widx] = wdata;
    end
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      if (last_read) begin
        checks++;
        if (rdata !== model[last_idx]) begin
          failures++; $display("FAIL word %0d got %h exp %h", last_idx, rdata, model[last_idx]);
        end
      end
      widx = (n % 3 == 0) ? int'($urandom % 32768) : ((int'($urandom % 256) * 131) % 32768);
      addr = 16'(widx * 2 + int'($urandom % 2));
      we = model.exists(widx) ? (($urandom % 4) == 0) : 1'b1;
      wdata = 16'($urandom);
      last_read = !we;
      last_idx = widx;
      if (we) model[widx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
