// piso_module: sends the 16-bit CRC serially, least significant bit first.
//
// While start (the data module's done) is high, serial_out presents
// data_vect_in[i] for the i-th 512-cycle bit period, i = 0..15, advancing on
// tick_512. The CRC register is frozen while this happens, so the value is
// read directly rather than copied. done rises after the sixteenth bit and
// stays high until start falls; it switches the 4:1 mux to the EOF module
// and starts it.
module piso_module (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        tick_512,
  input  logic [15:0] data_vect_in,
  output logic        serial_out,
  output logic        done
);

  logic [3:0] idx;
  logic       active;

  assign active = start & ~done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      done <= 1'b0;
    end else if (!start) begin
      idx  <= '0;
      done <= 1'b0;
    end else if (active && tick_512) begin
      if (idx == 4'd15) done <= 1'b1;
      else              idx  <= idx + 4'd1;
    end
  end

  assign serial_out = active & data_vect_in[idx];

endmodule
