// tb_manchester: exhaustive check of the Manchester XOR encoder (a 1 is low
// then high within the bit, a 0 high then low, clk_512 high in the first
// half) and of its enable, plus the thesis's example bit string 10111001.
module tb_manchester;
  logic d, c, en, out;
  int checks = 0, failures = 0;
  manchester dut (.data_serial_in(d), .clk_512(c), .enable(en), .manchester_out(out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] ex = 8'b1011_1001;
    for (int i = 0; i < 8; i++) begin
      {d, c, en} = 3'(i);
      #1;
      checks++;
      if (out != (en && (d ? !c : c))) begin failures++; $display("FAIL: case %0d", i); end
    end
    en = 1'b1;
    for (int i = 7; i >= 0; i--) begin
      d = ex[i];
      c = 1'b1; #1; checks++; if (out != !ex[i]) failures++;   // first half
      c = 1'b0; #1; checks++; if (out != ex[i]) failures++;    // second half
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
