// crc_module: serial CRC-16 of ISO/IEC 13239 (x^16 + x^12 + x^5 + 1).
//
// Sixteen flip-flops q[0..15] form the shift register of the classic
// shift-and-XOR circuit: the incoming bit XOR q[15] is fed back into q[0]
// and XORed into the chain in front of q[5] and q[12]. reset presets every
// flip-flop to 1 (FFFF). Each cycle with enable high absorbs one data bit,
// least significant bit of the least significant byte first. crc_out is the
// finished value the tag transmits: q in reverse bit order, complemented, so
// that crc_out[0] is the first bit on air. For forty zero bits it is CF77h.
module crc_module (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reset,
  input  logic        enable,
  input  logic        serial_in,
  output logic [15:0] crc_out
);

  logic [15:0] q;
  logic        fb;

  assign fb = serial_in ^ q[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '1;
    else if (reset)  q <= '1;
    else if (enable) q <= {q[14:12], q[11] ^ fb, q[10:5], q[4] ^ fb, q[3:0], fb};
  end

  always_comb begin
    for (int i = 0; i < 16; i++) crc_out[i] = ~q[15 - i];
  end

endmodule
