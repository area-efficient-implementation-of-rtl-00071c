// SOLS FM0/Manchester encoder (retimed form).
//
// One flip-flop serves both line codes. DFF_B holds B, the level the coded
// line had at the end of the previous bit. Each bit lasts one clock cycle:
// the first half-bit is sent while clk is high, the second while clk is low,
// and bit boundaries fall on the rising edge of clk.
//
//   Mux_2 (select mode):  0 -> B, 1 -> x
//   XNOR:                 x XNOR B
//   Mux_1 (select clk):   1 -> Mux_2, 0 -> XNOR
//   code  = NOT Mux_1,    and DFF_B stores code at the rising edge
//
// FM0 (mode = 0, clr_n = 1): first half = ~B (a transition at every bit
// boundary), second half = x XOR B (a mid-bit transition only for a 0).
// Manchester (mode = 1, clr_n = 0): DFF_B is held at 0, so the first half is
// ~x and the second half is x: a 1 is a low-to-high mid-bit transition and a
// 0 a high-to-low one.
//
// Interface and timing: x must be stable for the whole cycle, from just after
// one rising edge of clk up to and including the next, which is where the bit
// is written into DFF_B. code is combinational in clk, x, mode and B, exactly
// as in the multiplexer structure above, so the clock itself appears in the
// data path: code must only be used by logic that tolerates that (a line
// driver, or a receiver sampling it in the middle of each half-bit). clr_n
// is an active-low asynchronous clear of DFF_B; following the structure this
// design implements, it must be 1 in FM0 and 0 in Manchester (an assertion
// checks the latter whenever either input changes), so it can be
// driven as the inverse of mode. Because the clear acts at once, a switch
// from FM0 to Manchester is correct from the first Manchester bit on; a
// switch back to FM0 starts from B = 0, so its first half-bit is high.
//
// What follows the structure described for this encoder: the gate list, the
// mode and clear pairing and the output inversion after Mux_1. This design's
// own choices: the clear is asynchronous, and DFF_B is fed from the clk-low leg
// of Mux_1 (NOT of the XNOR). In hardware the flop samples the code in its
// setup window just before the rising edge, while clk is still low, which is
// that same value; feeding it explicitly keeps the register free of a race
// between the clock edge and the clock-selected multiplexer in simulation.
module sols_encoder
  import sols_pkg::*;
(
  input  logic       clk,
  input  logic       clr_n,
  input  code_mode_e mode,
  input  logic       x,
  output logic       code
);

  logic b_q;       // DFF_B: line level at the end of the previous bit
  logic mux2_out;  // first-half term, before the output inversion
  logic xnor_out;  // second-half term, before the output inversion
  logic mux1_out;

  always_comb begin
    mux2_out = (mode == MODE_MANCHESTER) ? x : b_q;
    xnor_out = ~(x ^ b_q);
    mux1_out = clk ? mux2_out : xnor_out;
    code     = ~mux1_out;
  end

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) b_q <= 1'b0;
    else        b_q <= ~xnor_out;
  end

  // Manchester relies on DFF_B being held clear; CLR may be low in FM0 too
  // (to clear the line state), but never high in Manchester.
  always_comb begin
    a_manchester_needs_clear: assert final (!(mode == MODE_MANCHESTER && clr_n))
      else $error("sols_encoder: Manchester mode with clr_n released");
  end

endmodule
