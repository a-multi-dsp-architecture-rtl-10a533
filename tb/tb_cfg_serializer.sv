// tb_cfg_serializer: self-checking test of the word-to-bit-stream converter.
//
// A scoreboard keeps every bit of every word accepted, MSB first, and
// compares it with cfg_din sampled at each rising edge of cfg_cclk. Phase 1
// sends words back to back and checks that the rising edges come exactly
// CLK_DIV cycles apart (one bit per CLK_DIV cycles, no gap between words) and
// that cfg_cclk is high for CLK_DIV/2 cycles. Phase 2 sends words with random
// gaps. Phase 3 checks the free-running clock (cfg_din high). Phase 4 cancels
// a word in the middle and checks that the clock stops and the block is
// empty. A watchdog ends the run if it hangs.
module tb_cfg_serializer;
  import cfg_pkg::*;

  localparam int unsigned CLK_DIV = 8;
  localparam int unsigned HALF    = CLK_DIV / 2;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  word_valid;
  word_t word_data;
  logic  word_ready;
  logic  cancel, free_run;
  logic  cfg_din, cfg_cclk, bit_tick, word_done, empty;

  int checks   = 0;
  int failures = 0;

  cfg_serializer #(.CLK_DIV(CLK_DIV)) dut (.*);

  always #5 clk = ~clk;

  // scoreboard
  logic exp_bits[$];
  int   cycle = 0;
  int   last_rise = -1;
  int   high_len  = 0;
  int   gap_check = 0;     // when set, rising edges must be CLK_DIV apart
  int   rises = 0, words_done = 0, free_bits = 0;
  logic cclk_d = 1'b0;
  logic expect_free = 1'b0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    cycle++;
    cclk_d <= cfg_cclk;
    if (cfg_cclk) high_len++;
    if (cfg_cclk && !cclk_d) begin
      rises++;
      check(bit_tick, "bit_tick marks the rising edge");
      if (gap_check != 0 && last_rise >= 0)
        check(cycle - last_rise == CLK_DIV, $sformatf("bit period %0d", cycle - last_rise));
      last_rise = cycle;
      if (expect_free) begin
        free_bits++;
        check(cfg_din == 1'b1, "free-running clock drives DIN high");
      end else if (exp_bits.size() == 0) begin
        check(1'b0, "unexpected CLK edge");
      end else begin
        check(cfg_din == exp_bits.pop_front(), "DIN bit value");
      end
    end
    if (!cfg_cclk && cclk_d) begin
      check(high_len == HALF, $sformatf("CLK high for %0d cycles", high_len));
      high_len = 0;
    end
    if (word_done) words_done++;
  end

  // Stimulus changes on the falling edge only; the transfer happens at the
  // rising edge that follows a falling edge with word_ready high.
  task automatic send(input word_t w);
    word_valid = 1'b1;
    word_data  = w;
    while (!word_ready) @(negedge clk);
    @(negedge clk);
    for (int b = WORD_W - 1; b >= 0; b--) exp_bits.push_back(w[b]);
    word_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start_rises;
    rst_n = 1'b0; word_valid = 1'b0; word_data = '0; cancel = 1'b0; free_run = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !cfg_cclk, "idle after reset");

    // Phase 1: back to back
    gap_check = 1;
    for (int i = 0; i < 12; i++) send($urandom());
    send(32'h8000_0001);
    send(32'hFFFF_0000);
    wait (empty);
    repeat (CLK_DIV) @(negedge clk);
    gap_check = 0;
    check(exp_bits.size() == 0, "all burst bits delivered");
    check(words_done == 14, $sformatf("word_done count %0d", words_done));
    check(rises == 14 * WORD_W, $sformatf("rising edges %0d", rises));
    repeat (3 * CLK_DIV) @(negedge clk);
    check(!cfg_cclk && rises == 14 * WORD_W, "clock stops when empty");

    // Phase 2: random gaps
    for (int i = 0; i < 10; i++) begin
      send($urandom());
      repeat ($urandom_range(0, 80)) @(negedge clk);
    end
    wait (empty);
    repeat (2 * CLK_DIV) @(negedge clk);
    check(exp_bits.size() == 0, "all gapped bits delivered");
    check(words_done == 24, $sformatf("word_done count %0d", words_done));

    // Phase 3: free-running clock
    expect_free = 1'b1;
    free_run = 1'b1;
    repeat (20 * CLK_DIV) @(negedge clk);
    free_run = 1'b0;
    repeat (2 * CLK_DIV) @(negedge clk);
    expect_free = 1'b0;
    check(free_bits >= 19 && free_bits <= 21, $sformatf("free-run clocks %0d", free_bits));

    // Phase 4: cancel in the middle of a word
    send(32'hA5A5_5A5A);
    send(32'h1234_5678);
    repeat (5 * CLK_DIV + 2) @(negedge clk);
    cancel = 1'b1;
    @(negedge clk);
    cancel = 1'b0;
    start_rises = rises;
    exp_bits.delete();
    repeat (4 * CLK_DIV) @(negedge clk);
    check(rises == start_rises && !cfg_cclk, "clock stopped by cancel");
    check(empty, "empty after cancel");
    check(words_done == 24, "canceled words not reported done");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
