// mux41: selects the response envelope: the SOF module (sel = 00), the
// Manchester encoder (sel = 01) or the EOF module (sel = 11); sel[0] is the
// SOF module's done and sel[1] the PISO module's done, so the combination
// 10 never occurs and gives 0. enable (low once the EOF module is done)
// gates the output off. Combinational, following the document's equation.
module mux41 (
  input  logic [2:0] in,
  input  logic [1:0] sel,
  input  logic       enable,
  output logic       out
);

  always_comb begin
    unique case (sel)
      2'b00:   out = in[0];
      2'b01:   out = in[1];
      2'b11:   out = in[2];
      default: out = 1'b0;
    endcase
    out = out & enable;
  end

endmodule
