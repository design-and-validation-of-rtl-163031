// frame_encoder: the tag's transmitter. It builds the ISO15693 response
// frame (one subcarrier, high data rate) and outputs the load-modulation
// drive signal.
//
// Chain of sub-modules, each started by the previous one's done, as in the
// document's transmitter architecture:
//   delay_module  t1 response delay after start
//   clock_module  fc/32, fc/256, fc/512 time base, runs once the delay is over
//   sof_module    8 half bits of SOF envelope
//   data_module   nbits of flags/data, LSB first   -+- mux21 -> manchester
//   crc_module    CRC-16 of those bits              |
//   piso_module   16 CRC bits, LSB first           -+
//   eof_module    8 half bits of EOF envelope
//   mux41         SOF / Manchester / EOF envelope, off once EOF is done
//   subcarrier_modulator  envelope AND fc/32
// A response with nbits data bits lasts 256 * (16 + 2 * (nbits + 16))
// carrier cycles after the delay: 128 half bits (2.42 ms) for a read answer,
// 64 half bits for a write answer.
//
// Interface: start is the controller's start_tx, high for the whole answer;
// every sub-module is cleared while it is low. load (one cycle, while start
// is high and the delay runs) captures data and nbits and presets the CRC.
// tx_env is the envelope before subcarrier multiplication, tx_out the
// registered product. eof_done rises when the EOF has been sent and stays
// high until start falls; because the sub-modules clear one after another
// along the done chain, it falls five cycles after start.
//
// Unlike the thesis, no sub-module is clocked by a divided or gated clock:
// everything runs on the carrier clock with the divided clocks' strobes as
// enables, so the block is one synchronous clock domain.
module frame_encoder #(
  parameter int unsigned N            = 40,
  parameter int unsigned DELAY_CYCLES = 4218
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   load,
  input  logic [N-1:0]           data,
  input  logic [$clog2(N+1)-1:0] nbits,
  output logic                   tx_env,
  output logic                   tx_out,
  output logic                   eof_done
);

  logic delay_done;
  logic clk_32, clk_256, clk_512, tick_256, tick_512;
  logic sof_out, sof_done;
  logic data_bit, crc_en, data_done;
  logic [15:0] crc;
  logic piso_bit, piso_done;
  logic serial_bit, manch_out, eof_out;

  delay_module #(.DELAY_CYCLES(DELAY_CYCLES)) u_delay (
    .clk, .rst_n, .start, .done(delay_done)
  );

  clock_module u_clock (
    .clk, .rst_n, .start(delay_done),
    .clk_32, .clk_256, .clk_512, .tick_256, .tick_512
  );

  sof_module u_sof (
    .clk, .rst_n, .start(delay_done), .tick_256, .sof_out, .done(sof_done)
  );

  data_module #(.N(N)) u_data (
    .clk, .rst_n, .data_vect_in(data), .nbits, .load, .start(sof_done), .tick_512,
    .serial_out(data_bit), .crc_en, .done(data_done)
  );

  crc_module u_crc (
    .clk, .rst_n, .reset(load), .enable(crc_en), .serial_in(data_bit), .crc_out(crc)
  );

  piso_module u_piso (
    .clk, .rst_n, .start(data_done), .tick_512, .data_vect_in(crc),
    .serial_out(piso_bit), .done(piso_done)
  );

  mux21 u_mux21 (.in0(data_bit), .in1(piso_bit), .sel(data_done), .out(serial_bit));

  manchester u_manchester (
    .data_serial_in(serial_bit), .clk_512, .enable(sof_done & ~piso_done),
    .manchester_out(manch_out)
  );

  eof_module u_eof (
    .clk, .rst_n, .start(piso_done), .tick_256, .eof_out, .done(eof_done)
  );

  mux41 u_mux41 (
    .in({eof_out, manch_out, sof_out}), .sel({piso_done, sof_done}), .enable(~eof_done),
    .out(tx_env)
  );

  subcarrier_modulator u_mod (.clk, .rst_n, .envelope(tx_env), .clk_32, .tx_out);

  // clk_256 is the half-bit clock the thesis fed to the SOF and EOF modules;
  // here they use its strobe tick_256 instead, so the level itself is unused.
  logic unused_clk_256;
  assign unused_clk_256 = clk_256;

endmodule
