// config_controller: reloads the configuration of up to N_DEV FPGA
// coprocessor devices with data supplied, word by word, by a DSP.
//
// Protocol on the two DSP channels (32-bit words, valid/ready handshake on
// each): the DSP sends one command word, then exactly "size" configuration
// words, and receives one status word back. For the command word,
//   [31 -: N_DEV]    select: bit i set means device i is reconfigured
//   [31-N_DEV : 0]   size of the configuration data in 32-bit words
// and for the status word,
//   [31]             1 = success (DONE seen and INIT never seen)
//   [31-N_DEV : 0]   number of data words shifted out to the devices
//
// Sequence: after the command word, program[i] is held active for
// PROG_CYCLES on every selected device, then the controller waits
// CLEAR_CYCLES for the devices to clear their configuration memory. Data
// words are then taken from the DSP and streamed out on cfg_din / cfg_cclk
// (cfg_serializer, one bit per CLK_DIV cycles, without gaps while the DSP
// keeps up). After the last bit, cfg_cclk keeps running with cfg_din high
// until DONE comes, INIT comes or STARTUP_CLKS clocks have gone by. A device
// that detects a transmission failure raises INIT: the controller then stops
// the stream at once, still accepts and discards the remaining data words so
// that the DSP side of the protocol completes, and reports failure together
// with the number of words it had shifted out. init_i and done_i are the
// shared INIT and DONE lines of all devices (INIT: some device failed; DONE:
// no device still loading). They are asynchronous to clk: each passes a
// two-flop synchroniser. A device that failed keeps INIT active until it is
// programmed again, so any later load fails until that device is reloaded.
//
// Timing: PROGRAM rises on the clock edge that accepts the command word; the
// data phase takes size * 32 * CLK_DIV cycles when the DSP keeps the holding
// register filled; the status word is offered (tx_valid) a few cycles after
// DONE and held, unchanged, until tx_ready.
//
// From the document: the command, data and status words and their fields,
// n PROGRAM lines with n = 8, shared DIN and CLK, wired-OR INIT and DONE,
// slave-serial loading, 5 MHz configuration clock (CLK_DIV = 8 from an
// assumed 40 MHz system clock). This design's own choices: bit positions,
// the size unit, the handshakes, all delays and timeouts, active-high logic
// levels for PROGRAM/INIT/DONE (pad polarity is left to the board), and the
// handling of a failure.
module config_controller
  import cfg_pkg::*;
#(
  parameter int unsigned N_DEV        = 8,     // PROGRAM lines / select-field bits
  parameter int unsigned CLK_DIV      = 8,     // system clocks per configuration bit
  parameter int unsigned PROG_CYCLES  = 16,    // PROGRAM pulse length
  parameter int unsigned CLEAR_CYCLES = 4096,  // wait after PROGRAM before data
  parameter int unsigned STARTUP_CLKS = 64     // clocks allowed after the data for DONE
) (
  input  logic             clk,
  input  logic             rst_n,
  // DSP -> controller channel
  input  logic             rx_valid,
  input  word_t            rx_data,
  output logic             rx_ready,
  // controller -> DSP channel
  output logic             tx_valid,
  output word_t            tx_data,
  input  logic             tx_ready,
  // device configuration lines
  output logic [N_DEV-1:0] program_o,
  output logic             cfg_din,
  output logic             cfg_cclk,
  input  logic             init_i,      // wired-OR of the devices' INIT
  input  logic             done_i,      // wired-OR of the devices' DONE
  output logic             busy
);

  localparam int unsigned SIZE_W = WORD_W - N_DEV;
  localparam int unsigned TMR_W  = 32;
  localparam int unsigned STATUS_OK_BIT = WORD_W - 1;

  initial begin
    if (N_DEV < 1 || N_DEV > WORD_W - 2)
      $error("config_controller: N_DEV must leave room for the size field");
  end

  ctrl_state_t       state_q;
  logic [N_DEV-1:0]  sel_q;
  logic [SIZE_W-1:0] size_q;
  logic [SIZE_W-1:0] rx_cnt_q;     // data words taken from the DSP
  logic [SIZE_W-1:0] tx_cnt_q;     // data words fully shifted out
  logic [TMR_W-1:0]  tmr_q;
  logic              failed_q;
  logic              done_seen_q;
  word_t             status_q;

  logic [1:0]        init_sync_q, done_sync_q;
  logic              init_s, done_s;

  logic ser_valid, ser_ready, ser_cancel, ser_free_run;
  logic ser_bit_tick, ser_word_done, ser_empty;
  logic more_words, monitor;

  // Two-flop synchronisers for the asynchronous device status lines.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_sync_q <= '0;
      done_sync_q <= '0;
    end else begin
      init_sync_q <= {init_sync_q[0], init_i};
      done_sync_q <= {done_sync_q[0], done_i};
    end
  end
  assign init_s = init_sync_q[1];
  assign done_s = done_sync_q[1];

  assign more_words = (rx_cnt_q != size_q);
  assign monitor    = (state_q == ST_LOAD) || (state_q == ST_FLUSH) ||
                      (state_q == ST_STARTUP);

  // Channel and serializer control.
  always_comb begin
    rx_ready     = 1'b0;
    ser_valid    = 1'b0;
    ser_free_run = (state_q == ST_STARTUP);
    ser_cancel    = monitor && init_s && !failed_q;
    unique case (state_q)
      ST_IDLE: rx_ready = 1'b1;
      ST_LOAD: begin
        if (more_words) begin
          if (failed_q || ser_cancel) begin
            rx_ready = 1'b1;                 // discard after a failure
          end else begin
            rx_ready  = ser_ready;
            ser_valid = rx_valid;
          end
        end
      end
      default: ;
    endcase
  end

  assign tx_valid = (state_q == ST_STATUS);
  assign tx_data  = status_q;
  assign busy     = (state_q != ST_IDLE);

  cfg_serializer #(
    .CLK_DIV (CLK_DIV)
  ) u_ser (
    .clk        (clk),
    .rst_n      (rst_n),
    .word_valid (ser_valid),
    .word_data  (rx_data),
    .word_ready (ser_ready),
    .cancel     (ser_cancel),
    .free_run   (ser_free_run),
    .cfg_din    (cfg_din),
    .cfg_cclk   (cfg_cclk),
    .bit_tick   (ser_bit_tick),
    .word_done  (ser_word_done),
    .empty      (ser_empty)
  );

  function automatic word_t make_status(input logic ok, input logic [SIZE_W-1:0] cnt);
    word_t w;
    w                = '0;
    w[SIZE_W-1:0]    = cnt;
    w[STATUS_OK_BIT] = ok;
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_IDLE;
      sel_q       <= '0;
      size_q      <= '0;
      rx_cnt_q    <= '0;
      tx_cnt_q    <= '0;
      tmr_q       <= '0;
      failed_q    <= 1'b0;
      done_seen_q <= 1'b0;
      status_q    <= '0;
      program_o   <= '0;
    end else begin
      if (monitor && init_s)
        failed_q <= 1'b1;
      if (monitor && done_s)
        done_seen_q <= 1'b1;
      if (ser_word_done && !failed_q && !ser_cancel)
        tx_cnt_q <= tx_cnt_q + 1'b1;
      if ((state_q == ST_LOAD) && rx_valid && rx_ready)
        rx_cnt_q <= rx_cnt_q + 1'b1;

      unique case (state_q)
        ST_IDLE: begin
          if (rx_valid) begin
            sel_q       <= rx_data[WORD_W-1 -: N_DEV];
            size_q      <= rx_data[SIZE_W-1:0];
            rx_cnt_q    <= '0;
            tx_cnt_q    <= '0;
            failed_q    <= 1'b0;
            done_seen_q <= 1'b0;
            tmr_q       <= '0;
            program_o   <= rx_data[WORD_W-1 -: N_DEV];
            state_q     <= ST_PROG;
          end
        end
        ST_PROG: begin
          if (tmr_q == TMR_W'(PROG_CYCLES - 1)) begin
            program_o <= '0;
            tmr_q     <= '0;
            state_q   <= ST_CLEAR;
          end else begin
            tmr_q <= tmr_q + 1'b1;
          end
        end
        ST_CLEAR: begin
          if (tmr_q >= TMR_W'(CLEAR_CYCLES)) begin
            tmr_q   <= '0;
            state_q <= ST_LOAD;
          end else begin
            tmr_q <= tmr_q + 1'b1;
          end
        end
        ST_LOAD: begin
          // Leave once the last data word has been taken from the DSP.
          if (!more_words)
            state_q <= (failed_q || init_s) ? ST_STATUS : ST_FLUSH;
        end
        ST_FLUSH: begin
          if (failed_q || init_s)
            state_q <= ST_STATUS;
          else if (ser_empty && !ser_word_done)
            state_q <= (done_seen_q || done_s) ? ST_STATUS : ST_STARTUP;
        end
        ST_STARTUP: begin
          if (init_s || done_s || failed_q || done_seen_q ||
              tmr_q >= TMR_W'(STARTUP_CLKS))
            state_q <= ST_STATUS;
          else if (ser_bit_tick)
            tmr_q <= tmr_q + 1'b1;
        end
        ST_STATUS: begin
          if (tx_ready)
            state_q <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase

      // The status word is frozen on the way into ST_STATUS.
      if (state_q != ST_STATUS)
        status_q <= make_status((done_seen_q || (monitor && done_s)) &&
                                !(failed_q || (monitor && init_s)), tx_cnt_q);
    end
  end

  // The status word stays offered, unchanged, until the DSP takes it.
  a_tx_hold : assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));
  // PROGRAM is only ever driven for the devices named in the command word.
  a_prog_sel : assert property (@(posedge clk) disable iff (!rst_n)
    (program_o & ~sel_q) == '0 || state_q == ST_IDLE);

endmodule
