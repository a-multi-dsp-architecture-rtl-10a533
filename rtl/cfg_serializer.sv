// cfg_serializer: turns 32-bit configuration words into a slave-serial
// bit-stream.
//
// A word accepted on the word_valid/word_ready handshake goes into a one-word
// holding register; while it waits there the previous word is shifted out of
// the shift register, most significant bit first, on cfg_din. Each bit lasts
// CLK_DIV system-clock cycles: cfg_cclk is low for the first CLK_DIV/2 cycles
// of the bit and high for the rest, so the receiving device samples cfg_din on
// the rising edge of cfg_cclk, half a bit after cfg_din changed. As long as
// the next word arrives before the last bit of the current one ends, the
// stream has no gaps: one bit every CLK_DIV cycles. With no data left,
// cfg_cclk stops low, unless free_run is set: then cfg_cclk keeps running with
// cfg_din high (the clocks a device needs after the data to start up).
// cancel empties both registers at once and stops the clock.
//
// Outputs cfg_din and cfg_cclk come straight from flip-flops. bit_tick is a
// one-cycle pulse in the cycle cfg_cclk goes high; word_done pulses in the
// cycle the last bit of a word ends; empty is high when no data bit is left.
//
// The document gives the job of this block (convert each word to a bit-stream
// on DIN, supply the clock CLK, slave-serial mode, 5 MHz); the MSB-first
// order, the clock divider, the double buffering and the free-running clock
// are this design's own choices.
module cfg_serializer
  import cfg_pkg::*;
#(
  parameter int unsigned CLK_DIV = 8   // system clocks per bit, even, >= 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  word_valid,
  input  word_t word_data,
  output logic  word_ready,
  input  logic  cancel,
  input  logic  free_run,
  output logic  cfg_din,
  output logic  cfg_cclk,
  output logic  bit_tick,
  output logic  word_done,
  output logic  empty
);

  localparam int unsigned HALF  = CLK_DIV / 2;
  localparam int unsigned PH_W  = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned REM_W = $clog2(WORD_W + 1);

  initial begin
    if (CLK_DIV < 2 || (CLK_DIV % 2) != 0)
      $error("cfg_serializer: CLK_DIV must be even and at least 2");
  end

  logic [PH_W-1:0]  phase_q, phase_d;
  logic             active_q, active_d;    // a bit period is in progress
  logic             is_data_q, is_data_d;  // that bit carries data (else free-run)
  word_t            sh_q, sh_d;
  logic [REM_W-1:0] rem_q, rem_d;          // data bits left in sh_q, current one included
  word_t            hold_q, hold_d;
  logic             hold_full_q, hold_full_d;
  logic             bit_end;
  logic             word_done_d;

  assign word_ready = !hold_full_q && !cancel;
  assign empty      = !hold_full_q && (rem_q == '0);

  always_comb begin
    phase_d     = phase_q;
    active_d    = active_q;
    is_data_d   = is_data_q;
    sh_d        = sh_q;
    rem_d       = rem_q;
    hold_d      = hold_q;
    hold_full_d = hold_full_q;
    word_done_d = 1'b0;

    bit_end = active_q && (phase_q == PH_W'(CLK_DIV - 1));

    if (active_q && !bit_end)
      phase_d = phase_q + 1'b1;

    // Retire the bit that just ended.
    if (bit_end && is_data_q) begin
      sh_d  = sh_q << 1;
      rem_d = rem_q - 1'b1;
      if (rem_q == REM_W'(1))
        word_done_d = 1'b1;
    end

    // Start the next bit period.
    if (!active_q || bit_end) begin
      phase_d = '0;
      if (rem_d != '0) begin
        active_d  = 1'b1;
        is_data_d = 1'b1;
      end else if (hold_full_q) begin
        sh_d        = hold_q;
        rem_d       = REM_W'(WORD_W);
        hold_full_d = 1'b0;
        active_d    = 1'b1;
        is_data_d   = 1'b1;
      end else if (free_run) begin
        active_d  = 1'b1;
        is_data_d = 1'b0;
      end else begin
        active_d  = 1'b0;
        is_data_d = 1'b0;
      end
    end

    if (word_valid && word_ready) begin
      hold_d      = word_data;
      hold_full_d = 1'b1;
    end

    if (cancel) begin
      phase_d     = '0;
      active_d    = 1'b0;
      is_data_d   = 1'b0;
      rem_d       = '0;
      hold_full_d = 1'b0;
      word_done_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q     <= '0;
      active_q    <= 1'b0;
      is_data_q   <= 1'b0;
      sh_q        <= '0;
      rem_q       <= '0;
      hold_q      <= '0;
      hold_full_q <= 1'b0;
      cfg_din     <= 1'b1;
      cfg_cclk    <= 1'b0;
      bit_tick    <= 1'b0;
      word_done   <= 1'b0;
    end else begin
      phase_q     <= phase_d;
      active_q    <= active_d;
      is_data_q   <= is_data_d;
      sh_q        <= sh_d;
      rem_q       <= rem_d;
      hold_q      <= hold_d;
      hold_full_q <= hold_full_d;
      cfg_din     <= is_data_d ? sh_d[WORD_W-1] : 1'b1;
      cfg_cclk    <= active_d && (phase_d >= PH_W'(HALF));
      bit_tick    <= active_d && (phase_d == PH_W'(HALF));
      word_done   <= word_done_d;
    end
  end

endmodule
