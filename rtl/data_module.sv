// data_module: parallel-in serial-out register for the response flags and
// block data.
//
// load (one cycle, from the controller) copies data_vect_in and the number
// of bits to send, nbits (40 for a read answer: flags then 32-bit block; 8
// for a write answer: flags only), and clears the module. While start (the
// SOF module's done) is high the register sends one bit per 512-cycle bit
// period, least significant bit first, shifting on tick_512. serial_out is
// combinational from the register, so the next bit appears on the first
// carrier cycle of its bit period and the module hands over to the CRC with
// no gap, which the thesis obtained by raising its done signals one bit
// early. crc_en marks the bit periods whose bit the CRC must absorb: it is
// high on each tick_512 while data is being sent. done rises after the last
// bit and stays high until start falls; it switches the 2:1 mux, stops the
// CRC and starts the PISO module. The thesis's module always sent 40 bits;
// the nbits input lets the same module produce the shorter write answer.
module data_module #(
  parameter int unsigned N = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           data_vect_in,
  input  logic [$clog2(N+1)-1:0] nbits,
  input  logic                   load,
  input  logic                   start,
  input  logic                   tick_512,
  output logic                   serial_out,
  output logic                   crc_en,
  output logic                   done
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  shreg;
  logic [CW-1:0] len, sent;
  logic          active;

  assign active = start & ~done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      len   <= '0;
      sent  <= '0;
      done  <= 1'b0;
    end else if (load) begin
      shreg <= data_vect_in;
      len   <= nbits;
      sent  <= '0;
      done  <= 1'b0;
    end else if (!start) begin
      done  <= 1'b0;
    end else if (active && tick_512) begin
      shreg <= shreg >> 1;
      sent  <= sent + 1'b1;
      if (sent + 1'b1 == len) done <= 1'b1;
    end
  end

  assign serial_out = active & shreg[0];
  assign crc_en     = active & tick_512;

endmodule
