// Shared type of the FM0/Manchester codec.
//
// code_mode_e names the value of the Mode pin that both the encoder and the
// decoder share: 0 selects FM0 (bi-phase space) and 1 selects Manchester.
// The values are the ones printed next to the mode inputs of the encoder and
// decoder multiplexers; the enum itself is only a naming convenience.
package sols_pkg;

  typedef enum logic {
    MODE_FM0        = 1'b0,
    MODE_MANCHESTER = 1'b1
  } code_mode_e;

endpackage
