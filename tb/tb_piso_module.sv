// tb_piso_module: presents 16-bit values, starts the module with a tick
// every 512 cycles and checks that bit i is on serial_out in the i-th bit
// period, LSB first, that done rises after sixteen bits with the output
// then low, and that start low clears it.
module tb_piso_module;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, tick_512;
  logic [15:0] d = '0;
  logic serial_out, done;
  int checks = 0, failures = 0, t = 0;
  always #5 clk = ~clk;
  piso_module dut (.clk, .rst_n, .start, .tick_512, .data_vect_in(d), .serial_out, .done);
  always @(posedge clk) t <= start ? t + 1 : 0;
  assign tick_512 = start && ((t % 512) == 511);
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
    logic [15:0] vals[3] = '{16'hCF77, 16'h8001, 16'h5A3C};
    repeat (3) @(negedge clk); rst_n = 1'b1; @(negedge clk);
    foreach (vals[v]) begin
      int bad = 0;
      d = vals[v];
      #1 check(!serial_out && !done, "idle before start");
      start = 1'b1;
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 512; c++) begin
          #1 if (serial_out != d[b] || done) bad++;
          @(negedge clk);
        end
      #1;
      check(bad == 0, $sformatf("%h: %0d mismatches", d, bad));
      check(done && !serial_out, "done after 16 bits");
      start = 1'b0; @(negedge clk); #1;
      check(!done, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
