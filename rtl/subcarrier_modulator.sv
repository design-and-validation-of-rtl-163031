// subcarrier_modulator: multiplies the response envelope with the fc/32
// subcarrier (an AND gate, as in the document) to produce the signal that
// switches the load-modulation transistor. The product is registered on the
// carrier clock so the pin does not glitch when envelope and subcarrier
// change together; tx_out therefore lags the envelope by one cycle.
module subcarrier_modulator (
  input  logic clk,
  input  logic rst_n,
  input  logic envelope,
  input  logic clk_32,
  output logic tx_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_out <= 1'b0;
    else        tx_out <= envelope & clk_32;
  end

endmodule
