// cfg_pkg: constants and types shared by the reconfiguration controller.
//
// The DSP and the configuration controller exchange 32-bit words over two
// unidirectional channels. Three kinds of word exist: the command word
// (device-select field plus size field), the configuration data words and
// the status word (success flag plus count of words transmitted).
//
// Word layouts (N = number of devices, the width of the select field):
//   command : [31 -: N] device select, one bit per device
//             [31-N : 0] size of the configuration data, in 32-bit words
//   status  : [31]       1 = reconfiguration succeeded (DONE seen, INIT not)
//             [31-N : 0] number of data words shifted out to the devices
//             other bits zero
// The 32-bit word, the select field and its meaning, and the contents of the
// status word follow the document; bit positions, the unit of the size field
// (words) and the state encoding are this design's own choice.
package cfg_pkg;

  localparam int unsigned WORD_W = 32;

  typedef logic [WORD_W-1:0] word_t;

  // Controller sequence.
  typedef enum logic [2:0] {
    ST_IDLE,     // wait for a command word
    ST_PROG,     // PROGRAM active on the selected devices
    ST_CLEAR,    // PROGRAM released, devices clear their configuration memory
    ST_LOAD,     // receive data words and stream them out on DIN
    ST_FLUSH,    // all words received, wait until the last bit has left
    ST_STARTUP,  // free-running CLK until DONE, INIT or a timeout
    ST_STATUS    // offer the status word to the DSP
  } ctrl_state_t;

endpackage
