// delay_module: holds the response back for the tag response time t1.
//
// ISO15693 asks the tag to begin its answer t1 = 4224/fc (311.5 us, within
// 4192/fc .. 4256/fc) after the end of the request. While start is low the
// counter is cleared and done is low; once start is high the module counts
// DELAY_CYCLES carrier cycles and then raises done, which stays high until
// start falls. Like the thesis, which counts about 306 us because the
// controller needs time to react, DELAY_CYCLES is the nominal t1 minus the
// cycles the rest of this core spends between the end of the request's EOF
// pause and start going high (six cycles: synchroniser, decoder and
// controller). The enable input of the thesis's module is folded into start.
module delay_module #(
  parameter int unsigned DELAY_CYCLES = 4218,
  parameter int unsigned CW           = $clog2(DELAY_CYCLES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done
);

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      done  <= 1'b0;
    end else if (!start) begin
      count <= '0;
      done  <= 1'b0;
    end else if (!done) begin
      if (count == CW'(DELAY_CYCLES - 1)) done <= 1'b1;
      else                                count <= count + 1'b1;
    end
  end

endmodule
