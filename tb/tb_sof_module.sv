// tb_sof_module: with a tick every 256 cycles, checks that sof_out
// follows the pattern 8'b0001_1101 one character per 256-cycle half bit from the
// moment start rises, that done rises after the eighth half bit and stays
// high, that the output is then low, and that start low clears the module.
module tb_sof_module;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, tick_256;
  logic sof_out, done;
  int checks = 0, failures = 0;
  int t = 0;
  localparam logic [7:0] PAT = 8'b0001_1101;
  always #5 clk = ~clk;
  sof_module dut (.clk, .rst_n, .start, .tick_256, .sof_out, .done);
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
  // reference tick generator, aligned to start
  always @(posedge clk) begin
    if (!start) t <= 0; else t <= t + 1;
  end
  assign tick_256 = start && ((t % 256) == 255);
  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1; repeat (3) @(negedge clk);
    check(!sof_out && !done, "idle");
    for (int rep = 0; rep < 2; rep++) begin
      start = 1'b1;
      for (int h = 0; h < 8; h++) begin
        for (int c = 0; c < 256; c++) begin
          #1;
          if (sof_out != PAT[7 - h] || done) begin
            check(1'b0, $sformatf("half bit %0d cycle %0d", h, c));
            break;
          end
          @(negedge clk);
        end
        checks++;
      end
      #1;
      check(done && !sof_out, "done after 8 half bits, output low");
      repeat (300) @(negedge clk);
      check(done && !sof_out, "stays done");
      start = 1'b0; @(negedge clk); #1;
      check(!done, "cleared");
      repeat (7) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
