// tb_frame_encoder: starts the transmitter with a read answer (40 bits),
// forty zero bits (whose CRC must be CF77h) and a write answer (8 bits), and
// decodes tx_out with the reader model. Checks the SOF and EOF shapes, the
// bits, the CRC computed here, the delay from start to the first
// subcarrier pulse (DELAY_CYCLES + 768 + 1 cycles: delay, the unmodulated
// SOF part, the output register), the frame length, the envelope/subcarrier
// relation, that eof_done rises at the end and the output stays quiet, and
// that eof_done clears within six cycles of start falling.
module tb_frame_encoder;

  localparam int unsigned DELAY = 300;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load = 1'b0;
  logic [39:0] data = '0;
  logic [5:0] nbits = '0;
  logic tx_env, tx_out, eof_done;
  logic ask_unused;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  frame_encoder #(.N(40), .DELAY_CYCLES(DELAY)) dut (
    .clk, .rst_n, .start, .load, .data, .nbits, .tx_env, .tx_out, .eof_done);
  reader_model reader (.clk, .tx_out, .ask(ask_unused));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // tx_out must be the envelope times a 32-cycle square wave, one cycle late
  logic env_q;
  int   bad_mod = 0;
  always @(posedge clk) begin
    env_q <= tx_env;
    if (tx_out && !env_q) bad_mod++;
  end

  function automatic logic [15:0] ref_crc(input logic [39:0] d, input int n);
    logic [15:0] r = 16'hFFFF;
    for (int i = 0; i < n; i++) begin
      logic fb = r[0] ^ d[i];
      r = {1'b0, r[15:1]} ^ (fb ? 16'h8408 : 16'h0);
    end
    return ~r;
  endfunction

  task automatic run(input logic [39:0] d, input int n, input string what);
    logic got, shape;
    logic [7:0] rb[8];
    int nb;
    longint fp, t0, tend;
    logic [15:0] c;
    @(negedge clk);
    start = 1'b1; load = 1'b1; data = d; nbits = 6'(n);
    t0 = cyc;
    @(negedge clk);
    load = 1'b0;
    data = ~d;   // must have been captured
    reader.receive_response(DELAY + 2000, got, rb, nb, fp, shape);
    check(got && shape, {what, ": answer with SOF and EOF"});
    check(nb == n + 16, $sformatf("%s: %0d bits", what, nb));
    check(fp - t0 == DELAY + 768 + 1, $sformatf("%s: first pulse after %0d cycles", what, fp - t0));
    c = ref_crc(d, n);
    if (n == 40) check({rb[4], rb[3], rb[2], rb[1], rb[0]} == d, {what, ": data bits"});
    else         check(rb[0] == d[7:0], {what, ": flags bits"});
    check({rb[n/8 + 1], rb[n/8]} == c, $sformatf("%s: CRC %h expected %h", what, {rb[n/8 + 1], rb[n/8]}, c));
    wait (eof_done);
    tend = cyc;
    check(tend - t0 == DELAY + 256 * (16 + 2 * (n + 16)),
          $sformatf("%s: frame ends after %0d cycles", what, tend - t0));
    repeat (600) begin
      @(posedge clk);
      if (tx_out || tx_env) begin check(1'b0, {what, ": quiet after EOF"}); break; end
    end
    @(negedge clk); start = 1'b0;
    repeat (6) @(negedge clk);
    check(!eof_done, {what, ": eof_done cleared by start low"});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!tx_out && !tx_env && !eof_done, "idle after reset");
    run({32'hAABBCCDD, 8'h00}, 40, "read answer");
    run(40'h0, 40, "forty zeros");
    check(ref_crc(40'h0, 40) == 16'hCF77, "CRC of forty zeros is CF77");
    run({32'h0, 8'h00}, 8, "write answer");
    run({32'h12345678, 8'h00}, 40, "second read answer");
    check(bad_mod == 0, "tx_out only where the envelope is high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
