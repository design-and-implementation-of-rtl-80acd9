// sols_pkg: types shared by the FM0 / Manchester / Miller line encoder.
//
// code_mode_e selects which line code the shared encoder produces. The
// encoding of the mode values is a choice of this design; the source
// description names the three codes but gives no select encoding. The fourth
// value is reserved and is treated as FM0 by the encoder.
package sols_pkg;

  typedef enum logic [1:0] {
    MODE_FM0        = 2'b00,
    MODE_MANCHESTER = 2'b01,
    MODE_MILLER     = 2'b10,
    MODE_RESERVED   = 2'b11
  } code_mode_e;

  // Two-bit state of the four-state Miller state machine (states 00..11).
  typedef enum logic [1:0] {
    MS_00 = 2'b00,
    MS_01 = 2'b01,
    MS_10 = 2'b10,
    MS_11 = 2'b11
  } miller_state_e;

endpackage
