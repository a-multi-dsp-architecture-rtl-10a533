// xc4013_slave_model: behavioural model (not synthesizable) of the
// configuration port of one SRAM FPGA loaded in slave-serial mode.
//
// program high clears the device: bit count, checksum, INIT and DONE go to
// zero and the device becomes ready for data. Each rising edge of cclk then
// shifts in one bit of din. The first len_bits bits are the configuration;
// they are folded into a 32-bit checksum (shift left, XOR 0x04C11DB7 when the
// bit shifted out is one) so that a testbench can verify the exact stream.
// DONE rises after len_bits + startup_bits clock edges. If err_at_bit is not
// zero, INIT rises at that clock edge instead and the device stops counting,
// which models a detected transmission failure. A device that has not been
// programmed ignores the shared clock. power_on_i returns the model to its
// power-on state, in which it holds a design loaded at power-up (DONE high).
// DONE is high while the device is configured and low from PROGRAM until it
// is configured again, as on a shared open-drain DONE line. The test inputs power_on_i, len_bits,
// startup_bits and err_at_bit are not pins of the real part.
module xc4013_slave_model (
  input  logic        power_on_i,     // test input: high = power-on state
  input  logic        program_i,
  input  logic        cclk,
  input  logic        din,
  output logic        init_o,
  output logic        done_o,
  input  int unsigned len_bits,
  input  int unsigned startup_bits,
  input  int unsigned err_at_bit,
  output int unsigned bits_seen,
  output logic [31:0] checksum,
  output int unsigned programmed_count
);
  logic armed = 1'b0;

  initial begin
    init_o = 1'b0;
    done_o = 1'b1;
    bits_seen = 0;
    checksum = '0;
    programmed_count = 0;
  end

  always @(posedge program_i or posedge power_on_i)
    programmed_count = power_on_i ? 0 : programmed_count + 1;

  always @(power_on_i or program_i or posedge cclk) begin
    if (power_on_i) begin
      armed     = 1'b0;
      bits_seen = 0;
      checksum  = '0;
      init_o    = 1'b0;
      done_o    = 1'b1;
    end else if (program_i) begin
      armed     = 1'b1;
      bits_seen = 0;
      checksum  = '0;
      init_o    = 1'b0;
      done_o    = 1'b0;
    end else if (cclk && armed && !init_o && !done_o) begin
      if (bits_seen < len_bits)
        checksum = {checksum[30:0], din} ^ (checksum[31] ? 32'h04C1_1DB7 : 32'h0);
      bits_seen++;
      if (err_at_bit != 0 && bits_seen == err_at_bit)
        init_o = 1'b1;
      else if (bits_seen == len_bits + startup_bits)
        done_o = 1'b1;
    end
  end
endmodule
