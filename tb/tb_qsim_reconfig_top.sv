// tb_qsim_reconfig_top: end-to-end run of the reconfiguration subsystem in
// the four-DSP machine: the root DSP drives the controller, three
// coprocessor devices sit on PROGRAM lines 0..2, device positions 3..7 are
// empty (INIT tied low, DONE tied high).
//
// The run models a simulation session: all three coprocessors get their own
// design at the start; one is reloaded while the DSP feeds words slowly
// (the serial clock then waits for data); a load fails with INIT; the failed
// device is reloaded; two devices get the same design at once; a load whose
// device never raises DONE ends by timeout; the DSP takes a status word late.
// Each mechanism is counted and must occur at least once. Expected status
// words and stream checksums are computed here from the words sent.
module tb_qsim_reconfig_top;
  import cfg_pkg::*;

  localparam int unsigned N_DEV        = 8;
  localparam int unsigned N_COP        = 3;
  localparam int unsigned CLK_DIV      = 8;
  localparam int unsigned PROG_CYCLES  = 16;
  localparam int unsigned CLEAR_CYCLES = 64;
  localparam int unsigned STARTUP_CLKS = 32;
  localparam int unsigned SIZE_W       = WORD_W - N_DEV;

  logic clk = 1'b0;
  logic rst_n;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  word_t rx_data, tx_data;
  logic [N_DEV-1:0] program_o, init_v, done_v;
  logic cfg_din, cfg_cclk, busy;

  int unsigned len_bits[N_COP], startup_bits[N_COP], err_at_bit[N_COP];
  int unsigned bits_seen[N_COP], prog_cnt[N_COP];
  logic [31:0] csum[N_COP];

  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_program = 0, n_success = 0, n_init_fail = 0, n_timeout = 0;
  int n_multi = 0, n_clk_wait = 0, n_startup_clk = 0, n_status_wait = 0, n_discard = 0;

  qsim_reconfig_top #(
    .N_DEV(N_DEV), .CLK_DIV(CLK_DIV), .PROG_CYCLES(PROG_CYCLES),
    .CLEAR_CYCLES(CLEAR_CYCLES), .STARTUP_CLKS(STARTUP_CLKS)
  ) dut (
    .clk, .rst_n,
    .dsp_rx_valid(rx_valid), .dsp_rx_data(rx_data), .dsp_rx_ready(rx_ready),
    .dsp_tx_valid(tx_valid), .dsp_tx_data(tx_data), .dsp_tx_ready(tx_ready),
    .program_o, .cfg_din, .cfg_cclk, .init_i(init_v), .done_i(done_v), .cfg_busy(busy)
  );

  for (genvar i = 0; i < N_COP; i++) begin : g_cop
    xc4013_slave_model u_dev (
      .power_on_i(!rst_n), .program_i(program_o[i]), .cclk(cfg_cclk), .din(cfg_din),
      .init_o(init_v[i]), .done_o(done_v[i]),
      .len_bits(len_bits[i]), .startup_bits(startup_bits[i]), .err_at_bit(err_at_bit[i]),
      .bits_seen(bits_seen[i]), .checksum(csum[i]), .programmed_count(prog_cnt[i])
    );
  end
  assign init_v[N_DEV-1:N_COP] = '0;
  assign done_v[N_DEV-1:N_COP] = '1;

  always #5 clk = ~clk;

  // Monitors: PROGRAM pulses, gaps in the bit stream while data is pending,
  // startup clocks, status words held back by the DSP.
  logic prog_d = 1'b0, cclk_d = 1'b0;
  int   since_rise = 0;
  int   rises_load = 0;   // CLK edges since the last command word
  always @(posedge clk) begin
    cycle++;
    prog_d <= |program_o;
    cclk_d <= cfg_cclk;
    if ((|program_o) && !prog_d) begin
      n_program++;
      if ($countones(program_o) > 1) n_multi++;
    end
    if (cfg_cclk && !cclk_d) begin
      // a gap of more than a bit: the holding register ran empty
      if (since_rise > 2 * CLK_DIV && busy && rises_load > 0) n_clk_wait++;
      since_rise = 0;
      rises_load++;
    end else begin
      since_rise++;
    end
    if (tx_valid && !tx_ready) n_status_wait++;
    // a data word accepted while INIT is active is discarded
    if (rx_valid && rx_ready && busy && (|init_v)) n_discard++;
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

  task automatic reconfig(input logic [N_DEV-1:0] sel, input word_t data[$],
                          input int gap, input int status_delay, output word_t st);
    for (int i = 0; i < N_COP; i++)
      if (sel[i]) len_bits[i] = data.size() * WORD_W;
    rises_load = 0;
    dsp_send({sel, SIZE_W'(data.size())});
    foreach (data[i]) begin
      dsp_send(data[i]);
      repeat (gap) @(negedge clk);
    end
    dsp_status(status_delay, st);
    if (st[31]) n_success++;
    if (rises_load > data.size() * WORD_W) n_startup_clk += rises_load - data.size() * WORD_W;
  endtask

  task automatic make_design(input int n, output word_t d[$]);
    d.delete();
    for (int i = 0; i < n; i++) d.push_back($urandom());
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d[$], d1[$];
    word_t st;
    int    t0;
    rst_n = 1'b0; rx_valid = 1'b0; rx_data = '0; tx_ready = 1'b0;
    for (int i = 0; i < N_COP; i++) begin
      len_bits[i] = 32; startup_bits[i] = 4 + i; err_at_bit[i] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Start of a simulation run: each coprocessor gets its own constraint type.
    for (int c = 0; c < N_COP; c++) begin
      make_design(24 + 8 * c, d);
      t0 = cycle;
      reconfig(N_DEV'(1) << c, d, 0, 0, st);
      check(st == {1'b1, 7'b0, SIZE_W'(d.size())}, $sformatf("initial load %0d status %h", c, st));
      check(csum[c] == stream_sum(d), $sformatf("initial load %0d stream", c));
      // time: command, PROGRAM, clear, data at one bit per CLK_DIV, startup, status
      check(cycle - t0 >= d.size() * WORD_W * CLK_DIV + PROG_CYCLES + CLEAR_CYCLES &&
            cycle - t0 <= d.size() * WORD_W * CLK_DIV + PROG_CYCLES + CLEAR_CYCLES +
                          (startup_bits[c] + 4) * CLK_DIV + 24,
            $sformatf("initial load %0d took %0d cycles", c, cycle - t0));
    end

    // During a step: reload coprocessor 2 with a DSP slower than the stream.
    make_design(6, d);
    reconfig(8'b0000_0100, d, WORD_W * CLK_DIV + 40, 0, st);
    check(st[31] && st[SIZE_W-1:0] == 6 && csum[2] == stream_sum(d), "slow-DSP reload");

    // A transmission failure on coprocessor 1 at bit 250 of 20 words.
    err_at_bit[1] = 250;
    make_design(20, d);
    t0 = n_discard;
    reconfig(8'b0000_0010, d, 0, 0, st);
    if (!st[31]) n_init_fail++;
    check(!st[31] && st[SIZE_W-1:0] == 7, $sformatf("failure status %h", st));
    check(n_discard > t0, "remaining words discarded after failure");
    err_at_bit[1] = 0;

    // Reload the failed device and coprocessor 0 together with one design.
    make_design(10, d);
    reconfig(8'b0000_0011, d, 0, 0, st);
    check(st[31] && st[SIZE_W-1:0] == 10, $sformatf("joint load status %h", st));
    check(csum[0] == stream_sum(d) && csum[1] == stream_sum(d), "joint load streams");
    check(csum[2] != stream_sum(d), "coprocessor 2 untouched");

    // A device that never raises DONE: timeout; the DSP reads the status late.
    startup_bits[0] = 10000;
    make_design(3, d);
    reconfig(8'b0000_0001, d, 0, 2000, st);
    if (!st[31]) n_timeout++;
    check(!st[31] && st[SIZE_W-1:0] == 3, $sformatf("timeout status %h", st));
    startup_bits[0] = 4;
    make_design(8, d1);
    reconfig(8'b0000_0001, d1, 0, 0, st);
    check(st[31] && csum[0] == stream_sum(d1), "reload after timeout");

    check(prog_cnt[0] == 4 && prog_cnt[1] == 3 && prog_cnt[2] == 2,
          $sformatf("PROGRAM counts %0d %0d %0d", prog_cnt[0], prog_cnt[1], prog_cnt[2]));

    $display("mechanisms: program=%0d success=%0d init_fail=%0d discard=%0d timeout=%0d multi=%0d clk_wait=%0d startup_clk=%0d status_wait=%0d",
             n_program, n_success, n_init_fail, n_discard, n_timeout, n_multi, n_clk_wait,
             n_startup_clk, n_status_wait);
    check(n_program == 8, "PROGRAM pulses");
    check(n_success == 6, "successful loads");
    check(n_init_fail > 0, "INIT failure happened");
    check(n_discard > 0, "discard after failure happened");
    check(n_timeout > 0, "DONE timeout happened");
    check(n_multi > 0, "simultaneous configuration happened");
    check(n_clk_wait > 0, "serial clock waited for data");
    check(n_startup_clk > 0, "startup clocks happened");
    check(n_status_wait > 0, "status word held for the DSP");
    check(!busy, "idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
