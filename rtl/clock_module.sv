// clock_module: time base of the frame encoder.
//
// A 9-bit counter runs from zero while start is high and is held at zero
// while it is low (the two states of the thesis's RESET / CLOCK GENERATION
// diagram). Its bits give the three divided clocks as levels:
//   clk_32  = fc/32  (423.75 kHz subcarrier)  from bit 4,
//   clk_256 = fc/256 (52.97 kHz, half bit)    from bit 7,
//   clk_512 = fc/512 (26.48 kHz, one bit)     from bit 8,
// each high in the first half of its period, so clk_512 rises at the start
// of every bit as in the Manchester example. The thesis used these as real
// clocks; here the encoder stays on the carrier clock and uses tick_256 and
// tick_512, one-cycle strobes on the last carrier cycle of each half bit and
// bit, as clock enables. The thesis takes the fc/32 clock from its counter's
// bit 5, which would divide by 64; bit 4 is used here so the subcarrier is the
// fc/32 that the text and the ISO standard give.
module clock_module (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic clk_32,
  output logic clk_256,
  output logic clk_512,
  output logic tick_256,
  output logic tick_512
);

  logic [8:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (!start) count <= '0;
    else             count <= count + 9'd1;
  end

  assign clk_32   = start & ~count[4];
  assign clk_256  = start & ~count[7];
  assign clk_512  = start & ~count[8];
  assign tick_256 = start & (&count[7:0]);
  assign tick_512 = start & (&count[8:0]);

endmodule
