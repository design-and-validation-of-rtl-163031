// frame_decoder: receiver for the reader-to-tag ISO15693 request frame.
//
// The reader sends "1 out of 4" pulse-position code: every two data bits
// occupy four 256-cycle slots, and a 128-cycle carrier pause (ask_in low)
// in the second half of slot v encodes the dibit v. Bytes go LSB pair first.
// The start of frame is a pause, then a second pause 640 cycles later; the end
// of frame is a pause half a slot later than any dibit position.
//
// The decoder measures the gap from the end of one pause (rising edge of
// ask_in) to the start of the next (falling edge) with an 11-bit counter,
// following the thesis's method. With p the previous dibit and n the new one,
// that gap is 256*k - 128 cycles with k = 4 + n - p, so n = p + k (mod 4);
// SOF's second pause counts 512 and behaves as a dibit 2. A gap is accepted
// inside +/-TOL cycles (the thesis allows +/-32 for noise). A gap of
// 1024 - 256*p cycles at a byte boundary is the EOF. Anything else, or a gap
// that overflows the counter, puts the decoder in its error state.
//
// Received bytes (up to 9: flags, command, block number, 4 data bytes, CRC)
// are stored and run through the CRC-16; at EOF the register must hold the
// residue F0B8. The thesis's decoder stored only two bytes and expected a
// fixed five-byte read request; the variable length, the write-request bytes
// and the CRC check on reception are this design's completion of it.
//
// Interface: ask_in is the asynchronous data-slicer output and is
// synchronised here (two flip-flops). eof pulses for one cycle when a
// complete frame has ended, at the end of the EOF pause; req is then valid
// and held until clear. frame_error is held high in the error state until
// clear. clear (the controller's clear_rx) returns the decoder to idle.
// The thesis clocked one of its two processes from ask_in's falling edge;
// here both run on clk and edges of ask_in are detected synchronously.
module frame_decoder
  import rfid_pkg::*;
#(
  parameter int unsigned TOL   = 32,   // accepted deviation of a gap, cycles
  parameter int unsigned CNT_W = 11    // gap counter width
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     ask_in,
  output logic     sof,
  output logic     eof,
  output logic     frame_error,
  output request_t req
);

  typedef enum logic [2:0] {
    D_IDLE, D_SOF_PAUSE, D_SOF_GAP, D_PAUSE, D_GAP, D_EOF_PAUSE, D_DONE, D_ERROR
  } dec_state_e;

  dec_state_e       state;
  logic [2:0]       ask_sync;          // [0],[1] synchroniser, [2] previous
  logic             ask_fall, ask_rise;
  logic [CNT_W-1:0] cnt;
  logic [1:0]       prev_dibit;
  logic [1:0]       dib_pos;
  logic [5:0]       shreg;   // dibits of the current byte received so far
  logic [3:0]       nbytes;
  logic [15:0]      crc;
  logic [7:0]       bytes [MAX_REQ_BYTES];

  assign ask_fall = ask_sync[2] & ~ask_sync[1];
  assign ask_rise = ~ask_sync[2] & ask_sync[1];

  function automatic logic in_window(input logic [CNT_W-1:0] c, input int unsigned nominal);
    return (int'(c) >= int'(nominal) - int'(TOL)) && (int'(c) < int'(nominal) + int'(TOL));
  endfunction

  // Classify a gap as a dibit step k (1..7); gap_ok low when it matches none.
  // Only k mod 4 is needed to form the new dibit.
  logic       gap_ok;
  logic [1:0] gap_k;
  always_comb begin
    gap_ok = 1'b0;
    gap_k  = 2'd0;
    for (int k = 1; k <= 7; k++) begin
      if (in_window(cnt, SLOT_CYCLES * k - PAUSE_CYCLES)) begin
        gap_ok = 1'b1;
        gap_k  = 2'(k);
      end
    end
  end

  logic       is_eof_gap;
  logic [1:0] new_dibit;
  logic [7:0] new_shreg;
  assign is_eof_gap = (dib_pos == 2'd0) &&
                      in_window(cnt, 4 * SLOT_CYCLES - SLOT_CYCLES * int'(prev_dibit));
  assign new_dibit  = prev_dibit + gap_k;
  assign new_shreg  = {new_dibit, shreg};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ask_sync <= 3'b111;
    end else begin
      ask_sync <= {ask_sync[1:0], ask_in};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      cnt        <= '0;
      prev_dibit <= 2'd2;
      dib_pos    <= 2'd0;
      shreg      <= '0;
      nbytes     <= '0;
      crc        <= CRC_PRESET;
      sof        <= 1'b0;
      eof        <= 1'b0;
      for (int i = 0; i < MAX_REQ_BYTES; i++) bytes[i] <= '0;
    end else begin
      eof <= 1'b0;
      if (state == D_SOF_GAP || state == D_GAP) cnt <= cnt + 1'b1;
      if (clear) begin
        state <= D_IDLE;
        sof   <= 1'b0;
      end else begin
        unique case (state)
          D_IDLE: if (ask_fall) state <= D_SOF_PAUSE;
          D_SOF_PAUSE: if (ask_rise) begin
            cnt   <= '0;
            state <= D_SOF_GAP;
          end
          D_SOF_GAP: begin
            if (ask_fall) begin
              if (in_window(cnt, 2 * SLOT_CYCLES)) begin
                state      <= D_PAUSE;
                sof        <= 1'b1;
                prev_dibit <= 2'd2;
                dib_pos    <= 2'd0;
                nbytes     <= '0;
                crc        <= CRC_PRESET;
              end else begin
                state <= D_ERROR;
              end
            end else if (&cnt) begin
              state <= D_ERROR;
            end
          end
          D_PAUSE: if (ask_rise) begin
            cnt   <= '0;
            state <= D_GAP;
          end
          D_GAP: begin
            if (ask_fall) begin
              if (is_eof_gap) begin
                state <= D_EOF_PAUSE;
              end else if (gap_ok) begin
                prev_dibit <= new_dibit;
                dib_pos    <= dib_pos + 2'd1;
                shreg      <= new_shreg[7:2];
                state      <= D_PAUSE;
                if (dib_pos == 2'd3) begin
                  if (nbytes == 4'(MAX_REQ_BYTES)) begin
                    state <= D_ERROR;          // longer than any supported request
                  end else begin
                    bytes[nbytes] <= new_shreg;
                    crc           <= crc16_byte(crc, new_shreg);
                    nbytes        <= nbytes + 4'd1;
                  end
                end
              end else begin
                state <= D_ERROR;
              end
            end else if (&cnt) begin
              state <= D_ERROR;
            end
          end
          D_EOF_PAUSE: if (ask_rise) begin
            state <= D_DONE;
            eof   <= 1'b1;
          end
          D_DONE:  ;
          D_ERROR: sof <= 1'b0;
          default: state <= D_IDLE;
        endcase
      end
    end
  end

  assign frame_error = (state == D_ERROR);

  always_comb begin
    req.flags  = bytes[0];
    req.cmd    = bytes[1];
    req.block  = bytes[2];
    req.data   = {bytes[6], bytes[5], bytes[4], bytes[3]};
    req.nbytes = nbytes;
    req.crc_ok = (crc == CRC_RESIDUE);
  end

endmodule
