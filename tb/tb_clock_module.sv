// tb_clock_module: checks the three divided clocks (periods 32, 256 and 512
// carrier cycles, 50 % duty, high in the first half of each period and
// aligned to start), the tick strobes on the last cycle of each 256- and
// 512-cycle period, and that everything is held low while start is low.
module tb_clock_module;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic clk_32, clk_256, clk_512, tick_256, tick_512;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  clock_module dut (.clk, .rst_n, .start, .clk_32, .clk_256, .clk_512, .tick_256, .tick_512);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int errs = 0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1;
    repeat (10) @(negedge clk);
    checks++; if (clk_32 | clk_256 | clk_512 | tick_256 | tick_512) failures++;
    start = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      // t = carrier cycles since start rose
      #1;
      if (clk_32   != ((t % 32)  < 16))  errs++;
      if (clk_256  != ((t % 256) < 128)) errs++;
      if (clk_512  != ((t % 512) < 256)) errs++;
      if (tick_256 != ((t % 256) == 255)) errs++;
      if (tick_512 != ((t % 512) == 511)) errs++;
      checks += 5;
      @(negedge clk);
    end
    if (errs != 0) $display("FAIL: %0d clock mismatches", errs);
    failures += errs;
    start = 1'b0; @(negedge clk);
    checks++; if (clk_32 | clk_256 | clk_512 | tick_256 | tick_512) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
