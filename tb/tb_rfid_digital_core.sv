// tb_rfid_digital_core: end-to-end test of the tag digital core at its
// default parameters. A reader model sends ISO15693 request frames on the
// demodulated input and decodes the load-modulated answers on tx_out.
//
// Sequence: write blocks, read them back, read the ADC block, and check
// each answer's flags, data and CRC (computed here with a bitwise CRC-16
// model) and the response time t1 (first subcarrier pulse is t1 + 768
// cycles after the end of the request's EOF pause; t1 within 4192..4256,
// nominal 4224). Then the drop paths: bad CRC, framing error, unknown
// command, block out of range, a frame that is too long; timing jitter
// within the decoder's tolerance. Each mechanism is counted and a failure is
// counted for any that never happened.
module tb_rfid_digital_core;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       ask;
  logic [7:0] adc_data = 8'h5A;
  logic       tx_out, tx_env;
  logic [1:0] state;
  logic       rx_frame_error;

  int checks = 0, failures = 0;

  always #37 clk = ~clk;   // ~13.5 MHz, 74 ns period

  rfid_digital_core dut (
    .clk, .rst_n, .ask_in(ask), .adc_data, .tx_out, .tx_env, .state, .rx_frame_error
  );

  reader_model reader (.clk, .tx_out, .ask);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_crc(input logic [7:0] b[], input int n);
    logic [15:0] r;
    r = 16'hFFFF;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < 8; k++) begin
        logic fb;
        fb = r[0] ^ b[i][k];
        r  = {1'b0, r[15:1]};
        if (fb) r = r ^ 16'h8408;
      end
    return ~r;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // counters of the mechanisms exercised
  int n_read = 0, n_write = 0, n_adc = 0, n_bad_crc = 0, n_frame_err = 0;
  int n_bad_cmd = 0, n_bad_block = 0, n_too_long = 0, n_jitter = 0, n_t1 = 0;

  task automatic build(input logic [7:0] flags, input logic [7:0] cmd, input logic [7:0] blk,
                       input logic with_data, input logic [31:0] d, input logic bad_crc,
                       output logic [7:0] frame[]);
    logic [7:0] b[];
    logic [15:0] c;
    int n;
    n = with_data ? 7 : 3;
    b = new[n + 2];
    b[0] = flags; b[1] = cmd; b[2] = blk;
    if (with_data) for (int i = 0; i < 4; i++) b[3+i] = d[8*i +: 8];
    c = ref_crc(b, n);
    if (bad_crc) c = c ^ 16'h0100;
    b[n] = c[7:0]; b[n+1] = c[15:8];
    frame = b;
  endtask

  // Send a request; expect an answer of exp_nbits (0: no answer).
  task automatic transact(input logic [7:0] frame[], input int jitter, input int bad_dibit,
                          input int exp_nbits, input logic [31:0] exp_data, input string what);
    logic       got, shape;
    logic [7:0] rb[8];
    logic [7:0] rbd[];
    int         nb;
    longint     fp, dt;
    logic [15:0] c;
    reader.send_frame(frame, jitter, bad_dibit);
    reader.receive_response(7000, got, rb, nb, fp, shape);
    if (exp_nbits == 0) begin
      check(!got, {what, ": no answer expected"});
      repeat (50) @(posedge clk);
      check(state == 2'd0, {what, ": controller back in IDLE"});
      return;
    end
    check(got, {what, ": answer received"});
    if (!got) return;
    check(shape, {what, ": SOF/EOF shape"});
    check(nb == exp_nbits + 16, $sformatf("%s: %0d bits received", what, nb));
    dt = fp - reader.eof_rise_cycle - 768;

    check(dt >= 4192 && dt <= 4256 && (dt - 4224 <= 3) && (4224 - dt <= 3),
          $sformatf("%s: response time t1 = %0d cycles", what, dt));
    n_t1++;
    check(rb[0] == 8'h00, {what, ": response flags 00"});
    if (exp_nbits == 40)
      check({rb[4], rb[3], rb[2], rb[1]} == exp_data,
            $sformatf("%s: data %h", what, {rb[4], rb[3], rb[2], rb[1]}));
    rbd = new[exp_nbits / 8];
    foreach (rbd[i]) rbd[i] = rb[i];
    c = ref_crc(rbd, exp_nbits / 8);
    check({rb[exp_nbits/8 + 1], rb[exp_nbits/8]} == c, {what, ": response CRC"});
    repeat (300) @(posedge clk);
  endtask

  logic [7:0] f[];
  logic [31:0] words[4] = '{32'hAABBCCDD, 32'h01234567, 32'hDEADBEEF, 32'h0000_00FF};
  logic [7:0]  blocks[4] = '{8'h01, 8'h11, 8'h00, 8'h1F};

  initial begin
    repeat (20) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    // read of a never-written block returns zero
    build(8'h02, 8'h20, 8'h01, 1'b0, 0, 1'b0, f);
    transact(f, 0, -1, 40, 32'h0, "read empty block 01");
    n_read++;

    for (int i = 0; i < 4; i++) begin
      build(8'h42, 8'h21, blocks[i], 1'b1, words[i], 1'b0, f);
      transact(f, 0, -1, 8, 0, $sformatf("write block %h", blocks[i]));
      n_write++;
    end
    for (int i = 3; i >= 0; i--) begin
      build(8'h02, 8'h20, blocks[i], 1'b0, 0, 1'b0, f);
      transact(f, 0, -1, 40, words[i], $sformatf("read block %h", blocks[i]));
      n_read++;
    end

    adc_data = 8'hC3;
    build(8'h02, 8'h20, 8'hFF, 1'b0, 0, 1'b0, f);
    transact(f, 0, -1, 40, 32'h0000_00C3, "read ADC block");
    n_adc++;

    // drop paths
    build(8'h02, 8'h20, 8'h01, 1'b0, 0, 1'b1, f);
    transact(f, 0, -1, 0, 0, "bad CRC");
    n_bad_crc++;
    build(8'h02, 8'h20, 8'h01, 1'b0, 0, 1'b0, f);
    transact(f, 0, 5, 0, 0, "framing error");
    n_frame_err++;
    build(8'h02, 8'h2B, 8'h01, 1'b0, 0, 1'b0, f);
    transact(f, 0, -1, 0, 0, "unsupported command");
    n_bad_cmd++;
    build(8'h42, 8'h21, 8'h40, 1'b1, 32'h1, 1'b0, f);
    transact(f, 0, -1, 0, 0, "write to missing block");
    n_bad_block++;
    begin
      automatic logic [7:0] lf[] = new[12];
      foreach (lf[i]) lf[i] = 8'(i);
      transact(lf, 0, -1, 0, 0, "frame too long");
      n_too_long++;
    end

    // the tag still works after the drops, and tolerates timing jitter
    build(8'h02, 8'h20, 8'h11, 1'b0, 0, 1'b0, f);
    transact(f, 14, -1, 40, words[1], "read with jitter");
    n_jitter++;
    build(8'h42, 8'h21, 8'h00, 1'b1, 32'hCAFEF00D, 1'b0, f);
    transact(f, 14, -1, 8, 0, "write with jitter");
    build(8'h02, 8'h20, 8'h00, 1'b0, 0, 1'b0, f);
    transact(f, 0, -1, 40, 32'hCAFEF00D, "read back jittered write");
    n_jitter++;

    $display("mechanisms: read=%0d write=%0d adc=%0d bad_crc=%0d frame_error=%0d bad_cmd=%0d bad_block=%0d too_long=%0d jitter=%0d t1_checked=%0d",
             n_read, n_write, n_adc, n_bad_crc, n_frame_err, n_bad_cmd, n_bad_block, n_too_long, n_jitter, n_t1);
    check(n_read > 0 && n_write > 0 && n_adc > 0 && n_bad_crc > 0 && n_frame_err > 0 &&
          n_bad_cmd > 0 && n_bad_block > 0 && n_too_long > 0 && n_jitter > 0 && n_t1 > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
