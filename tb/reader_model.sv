// reader_model: behavioural model of an ISO15693 reader for the testbenches
// (not part of the design). It drives the demodulated request signal that
// the tag's data slicer would deliver and decodes the tag's load-modulated
// answer.
//
// send_frame: SOF (1 out of 4), the given bytes with each dibit as a
// 128-cycle pause in the second half of its 256-cycle slot, then EOF. Gaps
// are disturbed by moving each pause by up to +/-jitter cycles (a gap changes by up to twice that), and one dibit (bad_dibit >= 0)
// can be misplaced by 128 cycles to provoke a framing error. The cycle on
// which the EOF pause ends is kept in eof_rise_cycle.
// receive_response: waits for subcarrier activity on tx_out, then reads
// 256-cycle half bits (modulated when most of a half bit's 8 subcarrier
// periods are present): SOF tail, Manchester bits, EOF. It returns the
// bytes, their bit count, the cycle of the first subcarrier pulse, and
// whether SOF and EOF had the right shape.
module reader_model (
  input  logic clk,
  input  logic tx_out,
  output logic ask
);

  longint cycle = 0;
  longint eof_rise_cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial ask = 1'b1;

  task automatic hold(input logic level, input int cycles);
    ask = level;
    repeat (cycles) @(negedge clk);
  endtask

  function automatic int jit(input int jitter);
    if (jitter == 0) return 0;
    return int'($urandom_range(2 * jitter)) - jitter;
  endfunction

  task automatic send_frame(input logic [7:0] bytes[], input int jitter, input int bad_dibit);
    int n, d, j;
    @(negedge clk);
    // SOF: pause, 512 high, pause, 256 high
    hold(1'b0, 128);
    j = jit(jitter);
    hold(1'b1, 512 + j);
    hold(1'b0, 128);
    hold(1'b1, 256 - j);
    n = 0;
    foreach (bytes[i]) begin
      for (int k = 0; k < 4; k++) begin
        d = int'(bytes[i][2*k +: 2]);
        j = jit(jitter);
        if (n == bad_dibit) j = 128;
        hold(1'b1, d * 256 + 128 + j);
        hold(1'b0, 128);
        hold(1'b1, (3 - d) * 256 - j);
        n++;
      end
    end
    // EOF: 256 high, pause, 128 high
    hold(1'b1, 256);
    hold(1'b0, 128);
    ask = 1'b1;
    eof_rise_cycle = cycle;
    repeat (128) @(negedge clk);
  endtask

  // Count subcarrier-high cycles of tx_out during one 256-cycle half bit.
  task automatic half_bit(output logic modulated);
    int highs;
    highs = 0;
    repeat (256) begin
      @(posedge clk);
      if (tx_out) highs++;
    end
    modulated = (highs > 64);
  endtask

  task automatic receive_response(input int timeout, output logic got,
                                  output logic [7:0] bytes[8], output int nbits,
                                  output longint first_pulse, output logic shape_ok);
    logic a, b, c;
    logic bits [128];
    int   w;
    got = 1'b0; nbits = 0; first_pulse = 0; shape_ok = 1'b0;
    foreach (bytes[i]) bytes[i] = '0;
    w = 0;
    while (!tx_out && w < timeout) begin
      @(posedge clk);
      w++;
    end
    if (!tx_out) return;
    got = 1'b1;
    first_pulse = cycle;
    // Already one cycle into the first modulated SOF half bit; the envelope
    // starts one cycle before tx_out (registered modulator) plus the
    // subcarrier phase, so align to half-bit boundaries from here.
    repeat (255) @(posedge clk);
    shape_ok = 1'b1;
    half_bit(a); half_bit(b);                  // rest of the 24 SOF pulses
    if (!(a && b)) shape_ok = 1'b0;
    half_bit(a); half_bit(b);                  // SOF logic 1
    if (!(!a && b)) shape_ok = 1'b0;
    forever begin
      half_bit(a); half_bit(b);
      if (a && !b)       begin bits[nbits] = 1'b0; nbits++; end
      else if (!a && b)  begin bits[nbits] = 1'b1; nbits++; end
      else if (a && b)   break;                // EOF: its logic 0 was taken as data
      else               begin shape_ok = 1'b0; break; end
      if (nbits >= 128) begin shape_ok = 1'b0; break; end
    end
    if (nbits > 0 && bits[nbits-1] == 1'b0) nbits--; else shape_ok = 1'b0;
    half_bit(c);                               // third EOF pulse half bit
    if (!c) shape_ok = 1'b0;
    for (int i = 0; i < 3; i++) begin
      half_bit(c);
      if (c) shape_ok = 1'b0;
    end
    for (int i = 0; i < nbits && i < 64; i++) bytes[i/8][i%8] = bits[i];
  endtask

endmodule
