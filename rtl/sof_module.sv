// sof_module: response SOF envelope generator.
//
// Shifts out the start of frame: 00011101, i.e. 56.64 us unmodulated, 24 subcarrier
// pulses, then a logic 1,
// one character per 256-cycle half bit (fc/256), as the document does with
// an eight-bit shift register clocked by clk_256. The envelope is later
// ANDed with the fc/32 subcarrier. start is high from the end of the response delay;
// the module is idle and cleared while start is low. After the eighth half
// bit, done rises and stays high until start falls, which moves the 4:1 mux
// on and stops this module. sof_out is combinational from the position
// counter, so it changes on the first carrier cycle of each half bit.
module sof_module
  import rfid_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic tick_256,
  output logic sof_out,
  output logic done
);

  logic [2:0] pos;
  logic       active;

  assign active = start & ~done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos  <= '0;
      done <= 1'b0;
    end else if (!start) begin
      pos  <= '0;
      done <= 1'b0;
    end else if (active && tick_256) begin
      if (pos == 3'd7) done <= 1'b1;
      else             pos  <= pos + 3'd1;
    end
  end

  assign sof_out = active & SOF_PATTERN[3'd7 - pos];

endmodule
