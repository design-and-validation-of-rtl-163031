// tb_mux41: exhaustive check: sel 00 -> in[0] (SOF), 01 -> in[1]
// (Manchester), 11 -> in[2] (EOF), 10 -> 0, all gated by enable.
module tb_mux41;
  logic [2:0] in;
  logic [1:0] sel;
  logic en, out, exp;
  int checks = 0, failures = 0;
  mux41 dut (.in, .sel, .enable(en), .out);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      {en, sel, in} = 6'(i);
      #1;
      case (sel)
        2'b00: exp = in[0];
        2'b01: exp = in[1];
        2'b11: exp = in[2];
        default: exp = 1'b0;
      endcase
      exp = exp & en;
      checks++;
      if (out != exp) begin failures++; $display("FAIL: case %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
