// manchester: Manchester encoder of the response bits.
//
// The serial bit stream changes once per 512-cycle bit and clk_512 is high
// in the first half of each bit, so their XOR is low then high for a 1 (a
// rising transition: unmodulated half, then subcarrier) and high then low
// for a 0, the ISO15693 high-data-rate bit coding. This is the document's
// XOR-with-clock encoder. The output is forced low while enable is low.
// Purely combinational.
module manchester (
  input  logic data_serial_in,
  input  logic clk_512,
  input  logic enable,
  output logic manchester_out
);

  assign manchester_out = enable & (data_serial_in ^ clk_512);

endmodule
