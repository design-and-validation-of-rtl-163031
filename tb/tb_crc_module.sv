// tb_crc_module: shifts byte strings into the CRC one bit per enabled cycle,
// LSB first, with idle cycles in between, and compares crc_out with a
// byte-table-free bitwise model of the reflected CRC-16 (poly 8408h, preset
// FFFFh, complemented). Includes the forty-zero-bit case (CF77h) and checks
// that appending the CRC gives the residue (crc_out = ~F0B8 = 0F47h).
module tb_crc_module;
  logic clk = 1'b0, rst_n = 1'b0, reset = 1'b0, enable = 1'b0, serial_in = 1'b0;
  logic [15:0] crc_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  crc_module dut (.clk, .rst_n, .reset, .enable, .serial_in, .crc_out);
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
  function automatic logic [15:0] model(input logic [7:0] b[]);
    int unsigned r = 32'hFFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        if (((r ^ b[i][k]) & 1) != 0) r = (r >> 1) ^ 32'h8408;
        else                          r = r >> 1;
      end
    return 16'(~r);
  endfunction
  task automatic feed(input logic [7:0] b[]);
    @(negedge clk); reset = 1'b1; @(negedge clk); reset = 1'b0;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        serial_in = b[i][k]; enable = 1'b1; @(negedge clk);
        enable = 1'b0; serial_in = 1'($urandom); repeat ($urandom_range(3)) @(negedge clk);
      end
  endtask
  initial begin
    logic [7:0] b[];
    repeat (3) @(negedge clk); rst_n = 1'b1;
    b = new[5]; foreach (b[i]) b[i] = 8'h00;
    feed(b);
    check(crc_out == 16'hCF77, $sformatf("forty zeros: %h", crc_out));
    b = '{8'h02, 8'h20, 8'h01};
    feed(b);
    check(crc_out == model(b), $sformatf("02 20 01: %h vs %h", crc_out, model(b)));
    for (int t = 0; t < 20; t++) begin
      logic [15:0] c;
      b = new[$urandom_range(1, 9)];
      foreach (b[i]) b[i] = 8'($urandom);
      feed(b);
      c = model(b);
      check(crc_out == c, $sformatf("random %0d bytes: %h vs %h", b.size(), crc_out, c));
      b = new[b.size() + 2](b);
      b[b.size() - 2] = c[7:0]; b[b.size() - 1] = c[15:8];
      feed(b);
      check(crc_out == ~16'hF0B8, $sformatf("residue %h", ~crc_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
