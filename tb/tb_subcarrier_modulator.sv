// tb_subcarrier_modulator: with a 32-cycle subcarrier and a random
// envelope, checks every cycle that tx_out equals the previous cycle's
// envelope AND subcarrier, and counts the subcarrier pulses sent while the
// envelope is high for 256 cycles (eight, as in an ISO15693 half bit).
module tb_subcarrier_modulator;
  logic clk = 1'b0, rst_n = 1'b0, env = 1'b0, sc = 1'b0, tx_out;
  logic exp_q = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  subcarrier_modulator dut (.clk, .rst_n, .envelope(env), .clk_32(sc), .tx_out);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int rises = 0;
    logic prev = 1'b0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 4096; t++) begin
      sc = ((t % 32) < 16);
      if (t % 256 == 0) env = 1'($urandom);
      exp_q = env & sc;
      @(posedge clk); #1;
      checks++;
      if (tx_out != exp_q) failures++;
      @(negedge clk);
    end
    env = 1'b1;
    for (int t = 0; t < 256; t++) begin
      sc = ((t % 32) < 16);
      @(posedge clk); #1;
      if (tx_out && !prev) rises++;
      prev = tx_out;
      @(negedge clk);
    end
    checks++;
    if (rises != 8) begin failures++; $display("FAIL: %0d pulses", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
