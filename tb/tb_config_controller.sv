// tb_config_controller: self-checking test of the configuration controller
// with eight slave-serial device models on its PROGRAM lines, shared DIN and
// CLK, INIT combined as the OR of all devices (any failure) and DONE as the
// AND (the shared line is released only when no device is still loading).
//
// Cases: one device loaded with the DSP sending back to back (checks the
// status word, the device's checksum of the received stream, the PROGRAM
// pulse length, and that the data phase takes exactly one bit per CLK_DIV
// cycles); three devices loaded at once with the same data; a DSP that sends
// with gaps; a transmission failure reported by INIT (failure flag, count of
// words shifted out before it, remaining words still accepted, clock
// stopped); DONE never coming (timeout); and a DSP that is slow to take the
// status word. Expected values are computed here from the words sent.
module tb_config_controller;
  import cfg_pkg::*;

  localparam int unsigned N_DEV        = 8;
  localparam int unsigned CLK_DIV      = 8;
  localparam int unsigned PROG_CYCLES  = 16;
  localparam int unsigned CLEAR_CYCLES = 64;
  localparam int unsigned STARTUP_CLKS = 16;
  localparam int unsigned SIZE_W       = WORD_W - N_DEV;
  localparam int unsigned DEV_STARTUP  = 6;   // clocks a device needs after its data

  logic clk = 1'b0;
  logic rst_n;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  word_t rx_data, tx_data;
  logic [N_DEV-1:0] program_o;
  logic cfg_din, cfg_cclk, busy;
  logic [N_DEV-1:0] init_v, done_v;

  int unsigned len_bits[N_DEV], startup_bits[N_DEV], err_at_bit[N_DEV];
  int unsigned bits_seen[N_DEV], prog_cnt[N_DEV];
  logic [31:0] csum[N_DEV];

  int checks = 0, failures = 0;
  int cycle = 0;

  config_controller #(
    .N_DEV(N_DEV), .CLK_DIV(CLK_DIV), .PROG_CYCLES(PROG_CYCLES),
    .CLEAR_CYCLES(CLEAR_CYCLES), .STARTUP_CLKS(STARTUP_CLKS)
  ) dut (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .tx_valid, .tx_data, .tx_ready,
    .program_o, .cfg_din, .cfg_cclk, .init_i(|init_v), .done_i(&done_v), .busy
  );

  for (genvar i = 0; i < N_DEV; i++) begin : g_dev
    xc4013_slave_model u_dev (
      .power_on_i(!rst_n), .program_i(program_o[i]), .cclk(cfg_cclk), .din(cfg_din),
      .init_o(init_v[i]), .done_o(done_v[i]),
      .len_bits(len_bits[i]), .startup_bits(startup_bits[i]), .err_at_bit(err_at_bit[i]),
      .bits_seen(bits_seen[i]), .checksum(csum[i]), .programmed_count(prog_cnt[i])
    );
  end

  always #5 clk = ~clk;

  // monitors
  int   rises = 0, first_rise = 0, last_rise = 0, data_last_rise = 0, data_bits = 0;
  int   prog_len = 0, prog_len_last = 0;
  logic cclk_d = 1'b0, prog_d = 1'b0;
  always @(posedge clk) begin
    cycle++;
    cclk_d <= cfg_cclk;
    prog_d <= |program_o;
    if (cfg_cclk && !cclk_d) begin
      if (rises == 0) first_rise = cycle;
      last_rise = cycle;
      rises++;
      if (rises == data_bits) data_last_rise = cycle;
    end
    if (|program_o) prog_len++;
    if (!(|program_o) && prog_d) begin
      prog_len_last = prog_len;
      prog_len = 0;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic logic [31:0] stream_sum(input word_t w[$]);
    logic [31:0] c = '0;
    foreach (w[i])
      for (int b = WORD_W - 1; b >= 0; b--)
        c = {c[30:0], w[i][b]} ^ (c[31] ? 32'h04C1_1DB7 : 32'h0);
    return c;
  endfunction

  // DSP side; all stimulus changes on the falling edge.
  task automatic dsp_send(input word_t w);
    rx_valid = 1'b1;
    rx_data  = w;
    while (!rx_ready) @(negedge clk);
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  task automatic dsp_status(input int delay, output word_t st);
    repeat (delay) @(negedge clk);
    tx_ready = 1'b1;
    while (!tx_valid) @(negedge clk);
    st = tx_data;
    @(negedge clk);
    tx_ready = 1'b0;
  endtask

  function automatic word_t cmd(input logic [N_DEV-1:0] sel, input int unsigned n);
    return {sel, SIZE_W'(n)};
  endfunction

  // One complete reconfiguration; returns the status word.
  task automatic reconfig(input logic [N_DEV-1:0] sel, input word_t data[$],
                          input int gap_max, input int status_delay,
                          output word_t st);
    for (int i = 0; i < N_DEV; i++)
      if (sel[i]) len_bits[i] = data.size() * WORD_W;
    rises = 0;
    data_bits = data.size() * WORD_W;
    dsp_send(cmd(sel, data.size()));
    foreach (data[i]) begin
      dsp_send(data[i]);
      if (gap_max > 0) repeat ($urandom_range(0, gap_max)) @(negedge clk);
    end
    dsp_status(status_delay, st);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t data[$];
    word_t st;
    int    r0;
    rst_n = 1'b0; rx_valid = 1'b0; rx_data = '0; tx_ready = 1'b0;
    for (int i = 0; i < N_DEV; i++) begin
      len_bits[i] = 32; startup_bits[i] = DEV_STARTUP; err_at_bit[i] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && program_o == '0 && !tx_valid, "idle after reset");

    // 1: one device, DSP back to back
    data.delete();
    for (int i = 0; i < 20; i++) data.push_back($urandom());
    reconfig(8'b0000_0001, data, 0, 0, st);
    check(st[31] == 1'b1, "case 1 success flag");
    check(st[SIZE_W-1:0] == 20, $sformatf("case 1 word count %0d", st[SIZE_W-1:0]));
    check(st[30:SIZE_W] == '0, "case 1 unused status bits zero");
    check(csum[0] == stream_sum(data), "case 1 device received the exact stream");
    check(prog_cnt[0] == 1 && prog_cnt[1] == 0 && prog_cnt[7] == 0, "case 1 only device 0 programmed");
    check(prog_len_last == PROG_CYCLES, $sformatf("PROGRAM pulse %0d cycles", prog_len_last));
    check(bits_seen[0] == 20 * WORD_W + DEV_STARTUP, $sformatf("case 1 clocks seen %0d", bits_seen[0]));
    // rising edges of the data bits are exactly CLK_DIV apart: first to last
    // data edge spans (bits-1)*CLK_DIV cycles; startup clocks follow at the same pace
    check(data_last_rise - first_rise == (20 * WORD_W - 1) * CLK_DIV,
          $sformatf("bit rate: data edges span %0d cycles", data_last_rise - first_rise));
    check(rises >= 20 * WORD_W + DEV_STARTUP, "case 1 enough clocks");

    // 2: three devices at once, same data, DSP with gaps
    data.delete();
    for (int i = 0; i < 12; i++) data.push_back($urandom());
    reconfig(8'b1000_1010, data, 300, 0, st);
    check(st[31] == 1'b1 && st[SIZE_W-1:0] == 12, $sformatf("case 2 status %h", st));
    check(csum[1] == stream_sum(data) && csum[3] == stream_sum(data) && csum[7] == stream_sum(data),
          "case 2 all three devices received the stream");
    check(prog_cnt[1] == 1 && prog_cnt[3] == 1 && prog_cnt[7] == 1 && prog_cnt[0] == 1 &&
          prog_cnt[2] == 0, "case 2 PROGRAM on the selected devices only");

    // 3: transmission failure at bit 100 of 16 words
    err_at_bit[2] = 100;
    data.delete();
    for (int i = 0; i < 16; i++) data.push_back($urandom());
    reconfig(8'b0000_0100, data, 0, 0, st);
    check(st[31] == 1'b0, "case 3 failure flagged");
    check(st[SIZE_W-1:0] == 3, $sformatf("case 3 words shifted before failure %0d", st[SIZE_W-1:0]));
    r0 = rises;
    repeat (10 * CLK_DIV) @(negedge clk);
    check(rises == r0 && !busy, "case 3 clock stopped, controller idle");
    err_at_bit[2] = 0;

    // 5: slow status read; device 2, which still holds INIT, is reloaded and now succeeds
    data.delete();
    for (int i = 0; i < 5; i++) data.push_back($urandom());
    reconfig(8'b0000_0100, data, 0, 200, st);
    check(st[31] == 1'b1 && st[SIZE_W-1:0] == 5, $sformatf("case 5 status %h", st));
    check(csum[2] == stream_sum(data), "case 5 stream after a failed load");
    // 4: DONE never comes
    startup_bits[4] = 1000;
    data.delete();
    for (int i = 0; i < 4; i++) data.push_back($urandom());
    reconfig(8'b0001_0000, data, 0, 0, st);
    check(st[31] == 1'b0 && st[SIZE_W-1:0] == 4, $sformatf("case 4 timeout status %h", st));
    check(bits_seen[4] >= 4 * WORD_W + STARTUP_CLKS && bits_seen[4] <= 4 * WORD_W + STARTUP_CLKS + 2,
          $sformatf("case 4 startup clocks bounded: %0d", bits_seen[4] - 4 * WORD_W));
    startup_bits[4] = DEV_STARTUP;

    check(!busy, "idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
