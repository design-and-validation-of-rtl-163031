// tb_mux21: exhaustive check: sel 0 passes in0 (data bits), sel 1 passes in1
// (CRC bits).
module tb_mux21;
  logic in0, in1, sel, out;
  int checks = 0, failures = 0;
  mux21 dut (.in0, .in1, .sel, .out);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, in1, in0} = 3'(i);
      #1;
      checks++;
      if (out != (sel ? in1 : in0)) begin failures++; $display("FAIL: case %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
