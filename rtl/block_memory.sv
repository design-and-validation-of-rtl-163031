// block_memory: the tag's user memory, NUM_BLOCKS blocks of 32 bits.
//
// Read Single Block returns a block and Write Single Block replaces one; the
// document gives the 32-bit block size but not the number of blocks, so
// NUM_BLOCKS (32, enough for the block numbers 01h and 11h used in the
// document's example commands) is this design's choice. Reads are
// combinational (asynchronous), writes happen on the rising clock edge when
// we is high. All blocks reset to zero.
module block_memory #(
  parameter int unsigned NUM_BLOCKS = 32,
  parameter int unsigned AW         = $clog2(NUM_BLOCKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [NUM_BLOCKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_BLOCKS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata = mem[addr];

endmodule
