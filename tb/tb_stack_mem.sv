// tb_stack_mem: self-checking test of the stack memory: random writes
// against a reference array, asynchronous read of every address (the
// word must be visible without a clock edge), and no write when we = 0.
module tb_stack_mem;
  logic clk = 1'b0;
  logic we;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [16];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  stack_mem dut (.clk, .we, .addr, .wdata, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    // Fill every word.
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 4'(a); wdata = 8'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk) we = 1'b0;
    // Random mix of writes and writes-disabled cycles.
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      addr = 4'($urandom);
      wdata = 8'($urandom);
      if (we) ref_mem[addr] = wdata;
      @(posedge clk);
      #1 check(rdata == ref_mem[addr], $sformatf("read back addr %0d after cycle %0d", addr, i));
    end
    @(negedge clk) we = 1'b0;
    // Asynchronous read: change the address between clock edges.
    for (int a = 0; a < 16; a++) begin
      addr = 4'(15 - a);
      #1 check(rdata == ref_mem[15 - a], $sformatf("read addr %0d: %h expected %h", 15 - a, rdata, ref_mem[15 - a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
