// qsim_reconfig_top: the reconfiguration subsystem of the multi-DSP machine.
//
// One configuration controller, attached to a DSP by two 32-bit channels,
// reloads up to N_DEV FPGA coprocessor devices. Every device has its own
// PROGRAM line (program_o[i]); the serial data line cfg_din and the
// configuration clock cfg_cclk are shared by all devices; the devices' INIT
// and DONE outputs are each joined into one wired line. On the INIT line any
// device that detects a failure asserts it, so its logical value is the OR of
// init_i. The DONE pins are open-drain: a device holds the line low from
// PROGRAM until it is configured again, so the line reads "done" only when no
// device holds it low, the AND of done_i (the OR of the "still loading"
// states). Inputs of unused device positions are tied: init_i low, done_i
// high, as the pull-ups of the open-drain lines would leave them. Setting several
// bits in the select field of a command word therefore loads the same
// configuration into several devices at once.
//
// In the four-DSP machine, the root DSP drives the rx/tx channel and three
// coprocessors, one behind each leaf DSP, hang on program_o[0..2]; unused
// PROGRAM lines stay inactive.
// The DSPs and the coprocessor devices themselves are outside this RTL.
//
// Timing is that of config_controller; the OR adds no register, and the
// controller synchronises the combined lines.
//
// From the document: the controller with n = 8 PROGRAM lines, shared DIN and
// CLK, INIT and DONE as wired-OR lines, the channel word size. Reading the
// wired DONE line as the AND of the devices' DONE states is this design's
// interpretation of the open-drain wiring. The active-high logic
// levels on the ports are this design's own convention.
module qsim_reconfig_top
  import cfg_pkg::*;
#(
  parameter int unsigned N_DEV        = 8,
  parameter int unsigned CLK_DIV      = 8,
  parameter int unsigned PROG_CYCLES  = 16,
  parameter int unsigned CLEAR_CYCLES = 4096,
  parameter int unsigned STARTUP_CLKS = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  // channel from the DSP
  input  logic             dsp_rx_valid,
  input  word_t            dsp_rx_data,
  output logic             dsp_rx_ready,
  // channel to the DSP
  output logic             dsp_tx_valid,
  output word_t            dsp_tx_data,
  input  logic             dsp_tx_ready,
  // coprocessor devices
  output logic [N_DEV-1:0] program_o,
  output logic             cfg_din,
  output logic             cfg_cclk,
  input  logic [N_DEV-1:0] init_i,
  input  logic [N_DEV-1:0] done_i,
  output logic             cfg_busy
);

  logic init_wor, done_wor;

  // The two shared status lines: any failure, and no device still loading.
  assign init_wor = |init_i;
  assign done_wor = &done_i;

  config_controller #(
    .N_DEV        (N_DEV),
    .CLK_DIV      (CLK_DIV),
    .PROG_CYCLES  (PROG_CYCLES),
    .CLEAR_CYCLES (CLEAR_CYCLES),
    .STARTUP_CLKS (STARTUP_CLKS)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx_valid  (dsp_rx_valid),
    .rx_data   (dsp_rx_data),
    .rx_ready  (dsp_rx_ready),
    .tx_valid  (dsp_tx_valid),
    .tx_data   (dsp_tx_data),
    .tx_ready  (dsp_tx_ready),
    .program_o (program_o),
    .cfg_din   (cfg_din),
    .cfg_cclk  (cfg_cclk),
    .init_i    (init_wor),
    .done_i    (done_wor),
    .busy      (cfg_busy)
  );

endmodule
