// tb_qsim_full_size: one complete reconfiguration of a coprocessor with a
// full-size configuration, with the subsystem at its default parameters
// (8 PROGRAM lines, 5 MHz configuration clock from a 40 MHz system clock).
//
// The configuration of the coprocessor FPGA is 247960 bits, sent as 7749
// 32-bit words (the last word padded with ones; the device model counts only
// the 247960 configuration bits into its checksum). The DSP sends the words
// as fast as they are accepted. The test checks the status word (success,
// 7749 words), the stream checksum seen by the device, and the time from the
// command word to the status word against the serial transfer time, and
// prints that time in milliseconds at a 40 MHz system clock.
module tb_qsim_full_size;
  import cfg_pkg::*;

  localparam int unsigned N_DEV     = 8;
  localparam int unsigned SIZE_W    = WORD_W - N_DEV;
  localparam int unsigned CFG_BITS  = 247960;
  localparam int unsigned CFG_WORDS = (CFG_BITS + WORD_W - 1) / WORD_W;
  localparam real         SYS_MHZ   = 40.0;

  logic clk = 1'b0;
  logic rst_n;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  word_t rx_data, tx_data;
  logic [N_DEV-1:0] program_o, init_v, done_v;
  logic cfg_din, cfg_cclk, busy;
  int unsigned bits_seen, prog_cnt;
  logic [31:0] csum;

  int checks = 0, failures = 0;
  longint cycle = 0;

  qsim_reconfig_top dut (
    .clk, .rst_n,
    .dsp_rx_valid(rx_valid), .dsp_rx_data(rx_data), .dsp_rx_ready(rx_ready),
    .dsp_tx_valid(tx_valid), .dsp_tx_data(tx_data), .dsp_tx_ready(tx_ready),
    .program_o, .cfg_din, .cfg_cclk, .init_i(init_v), .done_i(done_v), .cfg_busy(busy)
  );

  xc4013_slave_model u_cop (
    .power_on_i(!rst_n), .program_i(program_o[0]), .cclk(cfg_cclk), .din(cfg_din),
    .init_o(init_v[0]), .done_o(done_v[0]),
    .len_bits(CFG_BITS), .startup_bits(8), .err_at_bit(0),
    .bits_seen(bits_seen), .checksum(csum), .programmed_count(prog_cnt)
  );
  assign init_v[N_DEV-1:1] = '0;
  assign done_v[N_DEV-1:1] = '1;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t       w, st;
    logic [31:0] exp_sum;
    int unsigned bit_no;
    longint      t0, t1, serial;
    rst_n = 1'b0; rx_valid = 1'b0; rx_data = '0; tx_ready = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    exp_sum = '0;
    bit_no  = 0;
    t0 = cycle;
    rx_valid = 1'b1;
    rx_data  = {N_DEV'(1), SIZE_W'(CFG_WORDS)};
    while (!rx_ready) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < CFG_WORDS; i++) begin
      w = $urandom();
      for (int b = WORD_W - 1; b >= 0; b--) begin
        if (bit_no < CFG_BITS) begin
          exp_sum = {exp_sum[30:0], w[b]} ^ (exp_sum[31] ? 32'h04C1_1DB7 : 32'h0);
        end else begin
          w[b] = 1'b1;
        end
        bit_no++;
      end
      rx_data = w;
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
    end
    rx_valid = 1'b0;
    tx_ready = 1'b1;
    while (!tx_valid) @(negedge clk);
    st = tx_data;
    t1 = cycle;
    @(negedge clk);
    tx_ready = 1'b0;

    serial = longint'(CFG_WORDS) * WORD_W * 8;
    $display("full-size load: %0d words, %0d cycles = %0.2f ms at %0.0f MHz (serial part %0.2f ms)",
             CFG_WORDS, t1 - t0, real'(t1 - t0) / (SYS_MHZ * 1000.0), SYS_MHZ,
             real'(serial) / (SYS_MHZ * 1000.0));
    check(st == {1'b1, 7'b0, SIZE_W'(CFG_WORDS)}, $sformatf("status %h", st));
    check(csum == exp_sum, "device received the exact 247960-bit stream");
    check(bits_seen == CFG_BITS + 8 && prog_cnt == 1, "device clocked to DONE once");
    check(t1 - t0 >= serial && t1 - t0 <= serial + 16 + 4096 + 64 * 8 + 64,
          "load time is the serial transfer time plus the fixed overhead");
    check(real'(t1 - t0) / (SYS_MHZ * 1000.0) < 51.0, "faster than the 51 ms overall time");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
