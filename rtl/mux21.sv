// mux21: routes the data module's bits (sel = 0) or the PISO module's CRC
// bits (sel = 1) to the Manchester encoder; sel is the data module's done.
// output = in0 & ~sel | in1 & sel, as the document's truth table.
// Combinational.
module mux21 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic out
);

  assign out = (in0 & ~sel) | (in1 & sel);

endmodule
