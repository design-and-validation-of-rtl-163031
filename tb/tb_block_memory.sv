// tb_block_memory: checks that all blocks read zero after reset, that
// writes to random blocks are read back, that we low does not write, and
// that a shadow copy kept here agrees with every block at the end.
module tb_block_memory;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [4:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  block_memory dut (.clk, .rst_n, .we, .addr, .wdata, .rdata);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1; @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i); #1; checks++; if (rdata != 0) failures++;
      shadow[i] = 0;
    end
    for (int t = 0; t < 200; t++) begin
      addr = 5'($urandom); wdata = $urandom; we = 1'($urandom);
      if (we) shadow[addr] = wdata;
      @(negedge clk);
      we = 1'b0; #1;
      checks++;
      if (rdata != shadow[addr]) begin failures++; $display("FAIL: block %0d", addr); end
    end
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i); #1; checks++; if (rdata != shadow[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
