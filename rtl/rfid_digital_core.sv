// rfid_digital_core: digital core of a passive ISO15693 (13.56 MHz) RFID
// sensor tag. It answers Read Single Block and Write Single Block requests.
//
// The data slicer of the analog front end delivers the demodulated reader
// signal on ask_in (low during a carrier pause). frame_decoder turns the
// 1-out-of-4 coded request into bytes and checks its CRC; controller decides
// what to do and accesses block_memory; frame_encoder waits the response
// time t1, then sends SOF, flags (and block data), CRC and EOF, Manchester
// coded on the fc/32 subcarrier, on tx_out, which drives the load-modulation
// switch. The whole core runs on clk, the 13.56 MHz carrier recovered by the
// analog clock extractor; rst_n is the power-on reset (active low).
//
// Ports beyond the data path: adc_data is the sensor ADC sample, returned
// when the reader reads block ADC_BLOCK; tx_env is the response envelope
// before subcarrier multiplication; state shows the controller state, and
// rx_frame_error the decoder's error state, for test.
module rfid_digital_core
  import rfid_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS   = 32,
  parameter logic [7:0]  ADC_BLOCK    = 8'hFF,
  parameter int unsigned DELAY_CYCLES = 4218,
  parameter int unsigned RX_TOL       = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ask_in,
  input  logic [7:0] adc_data,
  output logic       tx_out,
  output logic       tx_env,
  output logic [1:0] state,
  output logic       rx_frame_error
);

  localparam int unsigned AW = $clog2(NUM_BLOCKS);

  request_t    req;
  logic        rx_sof, eof_rx, frame_error, clear_rx;
  logic        mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [39:0] data_to_tx;
  logic [5:0]  tx_nbits;
  logic        load, start_tx, eof_tx;
  ctl_state_e  ctl_state;

  frame_decoder #(.TOL(RX_TOL)) u_decoder (
    .clk, .rst_n, .clear(clear_rx), .ask_in,
    .sof(rx_sof), .eof(eof_rx), .frame_error, .req
  );

  controller #(.NUM_BLOCKS(NUM_BLOCKS), .ADC_BLOCK(ADC_BLOCK)) u_controller (
    .clk, .rst_n, .eof_rx, .frame_error, .req, .eof_tx, .adc_data,
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .data_to_tx, .tx_nbits, .load, .start_tx, .clear_rx, .state(ctl_state)
  );

  block_memory #(.NUM_BLOCKS(NUM_BLOCKS)) u_memory (
    .clk, .rst_n, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  frame_encoder #(.N(40), .DELAY_CYCLES(DELAY_CYCLES)) u_encoder (
    .clk, .rst_n, .start(start_tx), .load, .data(data_to_tx), .nbits(tx_nbits),
    .tx_env, .tx_out, .eof_done(eof_tx)
  );

  assign state          = ctl_state;
  assign rx_frame_error = frame_error;

  // rx_sof (SOF recognised) is an internal status the controller does not need.
  logic unused_sof;
  assign unused_sof = rx_sof;

endmodule
