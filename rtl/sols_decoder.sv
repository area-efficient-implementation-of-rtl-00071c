// SOLS FM0/Manchester decoder.
//
// Two flip-flops sample the coded line once per bit, on opposite edges of
// the decoder clock: DFF_1 on the falling edge and DFF_2 on the rising edge.
// With the clock phase described below, DFF_2 holds the first half-bit and
// DFF_1 the second half-bit of the same bit.
//
//   FM0 bit        = q1 XNOR q2  (halves equal -> 1, a mid-bit transition -> 0)
//   Manchester bit = NOT q2      (first half low -> 1, first half high -> 0)
//   MUX_2 (select mode): 0 -> FM0 bit, 1 -> Manchester bit
//
// Interface and timing: one bit per clock cycle. The decoder clock must rise
// in the middle of each bit, that is, it runs in antiphase to the encoder's
// clock (whose rising edges are the bit boundaries). Taking bit k as the bit
// whose second half ends at a falling edge of clk:
//   - the Manchester output is valid from the rising edge in the middle of
//     bit k until the rising edge in the middle of bit k+1;
//   - the FM0 output is valid from the falling edge that ends bit k until the
//     next rising edge (the first half of bit k+1). For the other half cycle
//     it pairs halves of two different bits and reads 0.
// So both codes can be read just before the rising edge that follows the end
// of the bit. rst is an active-high synchronous reset of both flip-flops.
//
// What follows the structure described for this decoder: the two flip-flops,
// the edge each is clocked on, the XNOR, the NOT on DFF_2 and the mode
// multiplexer. This design's own choices: the clock phase above, the reset
// being synchronous, and the validity windows that follow from them.
module sols_decoder
  import sols_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  code_mode_e mode,
  input  logic       data,
  output logic       decoded
);

  logic q1;  // DFF_1, falling edge
  logic q2;  // DFF_2, rising edge

  always_ff @(negedge clk) begin
    if (rst) q1 <= 1'b0;
    else     q1 <= data;
  end

  always_ff @(posedge clk) begin
    if (rst) q2 <= 1'b0;
    else     q2 <= data;
  end

  always_comb begin
    decoded = (mode == MODE_MANCHESTER) ? ~q2 : ~(q1 ^ q2);
  end

endmodule
