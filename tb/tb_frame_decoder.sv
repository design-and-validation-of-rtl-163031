// tb_frame_decoder: drives ISO15693 1-out-of-4 request frames into the
// frame decoder through the reader model and checks the decoded request
// (flags, command, block, data, byte count), the CRC verdict, the SOF and
// EOF indications, and that misplaced pauses, a bad SOF and an over-long
// frame end in the error state, from which clear returns it to idle.
module tb_frame_decoder;
  import rfid_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic ask;
  logic sof, eof, frame_error;
  request_t req;
  int checks = 0, failures = 0;
  int eof_pulses = 0;

  always #5 clk = ~clk;

  frame_decoder dut (.clk, .rst_n, .clear, .ask_in(ask), .sof, .eof, .frame_error, .req);
  reader_model reader (.clk, .tx_out(1'b0), .ask);

  always @(posedge clk) if (eof) eof_pulses++;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_crc(input logic [7:0] b[]);
    logic [15:0] r = 16'hFFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        logic fb = r[0] ^ b[i][k];
        r = {1'b0, r[15:1]} ^ (fb ? 16'h8408 : 16'h0);
      end
    return ~r;
  endfunction

  task automatic with_crc(input logic [7:0] b[], output logic [7:0] f[]);
    logic [15:0] c = ref_crc(b);
    f = new[b.size() + 2];
    foreach (b[i]) f[i] = b[i];
    f[b.size()] = c[7:0];
    f[b.size() + 1] = c[15:8];
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
  endtask

  initial begin
    logic [7:0] f[];
    int e0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // read request 02 20 01 + CRC
    with_crc('{8'h02, 8'h20, 8'h01}, f);
    e0 = eof_pulses;
    fork
      reader.send_frame(f, 0, -1);
      begin
        wait (sof);
        checks++;  // SOF recognised before the frame ends
      end
    join
    check(eof_pulses == e0 + 1, "read: one eof pulse");
    check(!frame_error, "read: no frame error");
    check(req.flags == 8'h02 && req.cmd == 8'h20 && req.block == 8'h01, "read: fields");
    check(req.nbytes == 4'd5, "read: 5 bytes");
    check(req.crc_ok, "read: CRC ok");
    do_clear();
    check(!sof, "clear drops sof");

    // write request 42 21 11 DDCCBBAA + CRC, with timing jitter
    with_crc('{8'h42, 8'h21, 8'h11, 8'hDD, 8'hCC, 8'hBB, 8'hAA}, f);
    e0 = eof_pulses;
    reader.send_frame(f, 14, -1);
    check(eof_pulses == e0 + 1, "write: eof pulse");
    check(req.flags == 8'h42 && req.cmd == 8'h21 && req.block == 8'h11, "write: fields");
    check(req.data == 32'hAABBCCDD, $sformatf("write: data %h", req.data));
    check(req.nbytes == 4'd9 && req.crc_ok, "write: 9 bytes, CRC ok");
    do_clear();

    // the E1h example byte and a corrupted CRC
    f = '{8'hE1, 8'h20, 8'h00, 8'h12, 8'h34};
    reader.send_frame(f, 0, -1);
    check(req.flags == 8'hE1, "E1h decoded");
    check(!req.crc_ok && !frame_error, "bad CRC flagged, frame complete");
    do_clear();

    // every dibit value at every byte position
    with_crc('{8'h1B, 8'hE4, 8'h00, 8'hFF, 8'h55, 8'hAA, 8'h39}, f);
    reader.send_frame(f, 0, -1);
    check(req.flags == 8'h1B && req.cmd == 8'hE4 && req.block == 8'h00 &&
          req.data == 32'h39AA55FF && req.crc_ok, "all dibit values");
    do_clear();

    // misplaced pause -> error, held until clear
    with_crc('{8'h02, 8'h20, 8'h01}, f);
    e0 = eof_pulses;
    reader.send_frame(f, 0, 6);
    check(frame_error, "misplaced pause: error");
    check(eof_pulses == e0, "misplaced pause: no eof");
    do_clear();
    check(!frame_error, "clear leaves error state");

    // SOF with the second pause 200 cycles late -> error
    @(negedge clk);
    reader.hold(1'b0, 128); reader.hold(1'b1, 712); reader.hold(1'b0, 128);
    reader.hold(1'b1, 300);
    check(frame_error, "bad SOF: error");
    do_clear();

    // ten bytes -> error
    f = '{8'h0, 8'h1, 8'h2, 8'h3, 8'h4, 8'h5, 8'h6, 8'h7, 8'h8, 8'h9};
    reader.send_frame(f, 0, -1);
    check(frame_error, "too long: error");
    do_clear();

    // no pause for a long time inside a frame -> counter overflow -> error
    @(negedge clk);
    reader.hold(1'b0, 128); reader.hold(1'b1, 512); reader.hold(1'b0, 128);
    reader.hold(1'b1, 2600);
    check(frame_error, "missing pause: error");
    do_clear();

    // still decodes afterwards
    with_crc('{8'h02, 8'h20, 8'h07}, f);
    reader.send_frame(f, 0, -1);
    check(req.block == 8'h07 && req.crc_ok && !frame_error, "decodes after errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
