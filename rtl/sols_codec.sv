// FM0/Manchester line codec for a DSRC baseband: the SOLS encoder on the
// transmit side and the SOLS decoder on the receive side.
//
// The transmit side turns one data bit per tx_clk cycle into two half-bits of
// FM0 or Manchester code on tx_code. The receive side takes the coded line on
// rx_data and recovers one bit per rx_clk cycle on rx_decoded. The two sides
// share no signal: between them lies the radio channel, and the receive side
// needs a clock that rises in the middle of each received bit (for a direct
// loop-back, rx_clk = ~tx_clk). Recovering that clock from the line is not
// part of this design.
//
// Ports, timing and mode encoding are those of sols_encoder and sols_decoder:
// mode 0 is FM0 and mode 1 Manchester; tx_clr_n must be 1 for FM0 and 0 for
// Manchester; rx_decoded is valid just before the rx_clk rising edge that
// follows the end of a bit. Keeping the two sides separate, with their own
// clock, reset and mode pins, is this design's choice.
module sols_codec
  import sols_pkg::*;
(
  // transmit side
  input  logic       tx_clk,
  input  logic       tx_clr_n,
  input  code_mode_e tx_mode,
  input  logic       tx_x,
  output logic       tx_code,
  // receive side
  input  logic       rx_clk,
  input  logic       rx_rst,
  input  code_mode_e rx_mode,
  input  logic       rx_data,
  output logic       rx_decoded
);

  sols_encoder u_encoder (
    .clk   (tx_clk),
    .clr_n (tx_clr_n),
    .mode  (tx_mode),
    .x     (tx_x),
    .code  (tx_code)
  );

  sols_decoder u_decoder (
    .clk     (rx_clk),
    .rst     (rx_rst),
    .mode    (rx_mode),
    .data    (rx_data),
    .decoded (rx_decoded)
  );

endmodule
