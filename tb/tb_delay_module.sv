// tb_delay_module: checks that done rises exactly DELAY_CYCLES cycles after
// start rises (at the default, 4218 cycles, which with the core's six
// cycles of reaction gives the nominal t1 of 4224/fc), stays high while
// start is high, and clears when start falls; also a start pulse that is
// withdrawn early never produces done.
module tb_delay_module;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  delay_module dut (.clk, .rst_n, .start, .done);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    int n;
    repeat (3) @(negedge clk); rst_n = 1'b1; @(negedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      start = 1'b1;
      n = 0;
      while (!done && n < 10000) begin @(negedge clk); n++; end
      check(n == 4218, $sformatf("done after %0d cycles", n));
      repeat (100) @(negedge clk);
      check(done, "done held while start high");
      start = 1'b0; @(negedge clk);
      check(!done, "done cleared by start low");
      repeat (5) @(negedge clk);
    end
    start = 1'b1; repeat (3000) @(negedge clk); start = 1'b0; @(negedge clk);
    start = 1'b1; repeat (3000) @(negedge clk);
    check(!done, "withdrawn start restarts the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
