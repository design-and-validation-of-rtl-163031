// tb_data_module: loads random 40-bit words (and 8-bit flags-only answers),
// starts the module with a tick every 512 cycles and checks that bit i of
// the word is on serial_out during the i-th bit period (LSB first), that
// crc_en pulses once per bit on the tick, that done rises after the last
// bit and the output is then low, and that the word was captured at load.
module tb_data_module;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load = 1'b0, tick_512;
  logic [39:0] d = '0;
  logic [5:0] nbits = '0;
  logic serial_out, crc_en, done;
  int checks = 0, failures = 0, t = 0;
  always #5 clk = ~clk;
  data_module dut (.clk, .rst_n, .data_vect_in(d), .nbits, .load, .start, .tick_512,
                   .serial_out, .crc_en, .done);
  always @(posedge clk) t <= start ? t + 1 : 0;
  assign tick_512 = start && ((t % 512) == 511);
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic run(input logic [39:0] w, input int n);
    int bad = 0, ens = 0;
    @(negedge clk); d = w; nbits = 6'(n); load = 1'b1;
    @(negedge clk); load = 1'b0; d = ~w;
    repeat (20) @(negedge clk);
    check(!serial_out && !done, "waits for start");
    start = 1'b1;
    for (int b = 0; b < n; b++) begin
      for (int c = 0; c < 512; c++) begin
        #1;
        if (serial_out != w[b] || done) bad++;
        if (crc_en != (c == 511)) bad++;
        if (crc_en) ens++;
        @(negedge clk);
      end
    end
    #1;
    check(bad == 0, $sformatf("%0d-bit word %h: %0d mismatches", n, w, bad));
    check(ens == n, "one crc_en per bit");
    check(done && !serial_out && !crc_en, "done after last bit");
    repeat (600) @(negedge clk);
    check(done && !serial_out, "stays done");
    start = 1'b0; @(negedge clk);
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1;
    run(40'h0123456789, 40);
    run({$urandom, 8'(($urandom))}, 40);
    run(40'hFFFF_FFFF_A5, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
