// controller: the tag's control state machine, IDLE -> COMPARE -> TRANSMIT
// -> WAIT_STATE -> IDLE, as the document describes it.
//
// IDLE: the frame decoder may receive. When it reports a frame error, or a
// complete frame (eof_rx) whose CRC residue is wrong, the request is dropped:
// clear_rx pulses for one cycle and the machine stays in IDLE. A good frame
// moves it to COMPARE.
// COMPARE: the command code decides the operation. Read Single Block (20h,
// five request bytes) answers flags 00h followed by the 32-bit block;
// Write Single Block (21h, nine request bytes) stores the data and answers
// the flags byte alone. Any other request, or a block number the tag does
// not have, is dropped without an answer, since the document's tag never
// sends error responses. Block ADC_BLOCK is not memory: reading it returns
// the sensor ADC sample, zero-extended (the document gives the controller
// an 8-bit ADC input but not how the reader reaches it; this mapping is
// this design's choice). The request flags byte is not interpreted: the
// document uses only the plain (non-addressed) form of both commands.
// TRANSMIT: load pulses for one cycle so the frame encoder captures
// data_to_tx and tx_nbits; start_tx rises and stays high. clear_rx holds the
// decoder in reset for the whole answer.
// WAIT_STATE: waits for eof_tx from the encoder, then returns to IDLE, which
// lowers start_tx and releases the decoder.
//
// data_to_tx is sent LSB first: bits [7:0] are the response flags, bits
// [39:8] the block, least significant byte first.
module controller
  import rfid_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 32,
  parameter int unsigned AW         = $clog2(NUM_BLOCKS),
  parameter logic [7:0]  ADC_BLOCK  = 8'hFF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eof_rx,
  input  logic          frame_error,
  input  request_t      req,
  input  logic          eof_tx,
  input  logic [7:0]    adc_data,
  // block memory port
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata,
  // frame encoder and decoder control
  output logic [39:0]   data_to_tx,
  output logic [5:0]    tx_nbits,
  output logic          load,
  output logic          start_tx,
  output logic          clear_rx,
  output ctl_state_e    state
);

  logic drop;
  logic is_read, is_write, block_in_mem, block_is_adc;

  assign block_in_mem = (int'(req.block) < int'(NUM_BLOCKS));
  assign block_is_adc = (req.block == ADC_BLOCK);
  assign is_read  = (req.cmd == CMD_READ_SINGLE)  && (req.nbytes == 4'(READ_REQ_BYTES)) &&
                    (block_in_mem || block_is_adc);
  assign is_write = (req.cmd == CMD_WRITE_SINGLE) && (req.nbytes == 4'(WRITE_REQ_BYTES)) &&
                    block_in_mem;

  assign mem_addr  = AW'(req.block);
  assign mem_wdata = req.data;
  assign mem_we    = (state == CTL_COMPARE) && is_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CTL_IDLE;
      data_to_tx <= '0;
      tx_nbits   <= '0;
      drop       <= 1'b0;
    end else begin
      drop <= 1'b0;
      unique case (state)
        CTL_IDLE: begin
          if (frame_error) begin
            drop <= 1'b1;
          end else if (eof_rx) begin
            if (req.crc_ok) state <= CTL_COMPARE;
            else            drop  <= 1'b1;
          end
        end
        CTL_COMPARE: begin
          if (is_read) begin
            data_to_tx <= {(block_is_adc ? {24'h0, adc_data} : mem_rdata), RESP_FLAGS_OK};
            tx_nbits   <= 6'd40;
            state      <= CTL_TRANSMIT;
          end else if (is_write) begin
            data_to_tx <= {32'h0, RESP_FLAGS_OK};
            tx_nbits   <= 6'd8;
            state      <= CTL_TRANSMIT;
          end else begin
            drop  <= 1'b1;
            state <= CTL_IDLE;
          end
        end
        CTL_TRANSMIT: state <= CTL_WAIT;
        CTL_WAIT:     if (eof_tx) state <= CTL_IDLE;
        default:      state <= CTL_IDLE;
      endcase
    end
  end

  assign load     = (state == CTL_TRANSMIT);
  assign start_tx = (state == CTL_TRANSMIT) || (state == CTL_WAIT);
  assign clear_rx = start_tx || drop;

  // The encoder is only started with one of the two response lengths.
  a_nbits: assert property (@(posedge clk) disable iff (!rst_n)
                            load |-> (tx_nbits == 6'd40 || tx_nbits == 6'd8));

endmodule
