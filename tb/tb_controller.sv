// tb_controller: drives the controller's inputs directly (decoded request,
// eof_rx, frame_error, eof_tx) against a small memory model and checks the
// state sequence IDLE -> COMPARE -> TRANSMIT -> WAIT_STATE -> IDLE, the
// answer it loads (flags 00h, block data LSB first, 40 or 8 bits), memory
// writes, the ADC block, and the drops (frame error, bad CRC, unknown
// command, wrong length, missing block) with their clear_rx pulse.
module tb_controller;
  import rfid_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic eof_rx = 1'b0, frame_error = 1'b0, eof_tx = 1'b0;
  request_t req;
  logic [7:0] adc_data = 8'h77;
  logic mem_we;
  logic [4:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [39:0] data_to_tx;
  logic [5:0] tx_nbits;
  logic load, start_tx, clear_rx;
  ctl_state_e state;
  logic [31:0] mem [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  controller dut (.clk, .rst_n, .eof_rx, .frame_error, .req, .eof_tx, .adc_data,
                  .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
                  .data_to_tx, .tx_nbits, .load, .start_tx, .clear_rx, .state);

  assign mem_rdata = mem[mem_addr];
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request(input logic [7:0] cmd, input logic [7:0] blk, input logic [31:0] d,
                         input logic [3:0] n, input logic crc_ok);
    req = '{flags: 8'h02, cmd: cmd, block: blk, data: d, nbytes: n, crc_ok: crc_ok};
    @(negedge clk); eof_rx = 1'b1; @(negedge clk); eof_rx = 1'b0;
  endtask

  // Expect a full answer; returns what was loaded.
  task automatic expect_answer(input logic [39:0] exp_data, input logic [5:0] exp_n,
                               input string what);
    check(state == CTL_COMPARE, {what, ": COMPARE"});
    @(negedge clk);
    check(state == CTL_TRANSMIT && load && start_tx && clear_rx, {what, ": TRANSMIT, load"});
    check(((data_to_tx ^ exp_data) & ((40'd1 << exp_n) - 40'd1)) == 40'd0 && tx_nbits == exp_n,
          $sformatf("%s: loaded %h/%0d", what, data_to_tx, tx_nbits));
    @(negedge clk);
    check(state == CTL_WAIT && !load && start_tx && clear_rx, {what, ": WAIT_STATE"});
    repeat (30) @(negedge clk);
    check(state == CTL_WAIT && start_tx, {what, ": waits for eof_tx"});
    eof_tx = 1'b1; @(negedge clk); eof_tx = 1'b0;
    check(state == CTL_IDLE && !start_tx && !clear_rx, {what, ": back to IDLE"});
  endtask

  task automatic expect_drop(input string what, input logic via_compare);
    if (via_compare) begin
      check(state == CTL_COMPARE, {what, ": COMPARE"});
      @(negedge clk);
    end
    check(state == CTL_IDLE && clear_rx && !start_tx, {what, ": dropped with clear_rx"});
    @(negedge clk);
    check(!clear_rx && state == CTL_IDLE, {what, ": clear_rx one cycle"});
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 32'h1000 + i;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == CTL_IDLE && !start_tx && !clear_rx && !load, "reset: IDLE");

    request(8'h20, 8'h05, 0, 4'd5, 1'b1);
    expect_answer({32'h1005, 8'h00}, 6'd40, "read 05");

    request(8'h21, 8'h05, 32'hAABBCCDD, 4'd9, 1'b1);
    check(mem_we && mem_wdata == 32'hAABBCCDD && mem_addr == 5'd5, "write: memory strobe");
    expect_answer({32'h0, 8'h00}, 6'd8, "write 05");
    check(mem[5] == 32'hAABBCCDD, "write stored");

    request(8'h20, 8'h05, 0, 4'd5, 1'b1);
    expect_answer({32'hAABBCCDD, 8'h00}, 6'd40, "read back 05");

    request(8'h20, 8'hFF, 0, 4'd5, 1'b1);
    expect_answer({32'h77, 8'h00}, 6'd40, "read ADC");

    request(8'h20, 8'h05, 0, 4'd5, 1'b0);
    expect_drop("bad CRC", 1'b0);
    request(8'h2B, 8'h05, 0, 4'd5, 1'b1);
    expect_drop("unknown command", 1'b1);
    request(8'h20, 8'h05, 0, 4'd9, 1'b1);
    expect_drop("read with wrong length", 1'b1);
    request(8'h21, 8'h25, 32'h1, 4'd9, 1'b1);
    check(!mem_we, "no write to missing block");
    expect_drop("write to missing block", 1'b1);
    request(8'h21, 8'hFF, 32'h1, 4'd9, 1'b1);
    expect_drop("write to ADC block", 1'b1);
    @(negedge clk); frame_error = 1'b1; @(negedge clk); frame_error = 1'b0;
    expect_drop("frame error", 1'b0);

    request(8'h20, 8'h00, 0, 4'd5, 1'b1);
    expect_answer({32'h1000, 8'h00}, 6'd40, "read 00 after drops");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
