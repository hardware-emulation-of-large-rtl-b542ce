// single_bit_processor: the True/Inv multiplexer, AND Block and XOR (or OR)
// Block of a sequencer.
//
// Equations are executed in reverse Polish order: every operand-read
// instruction (op_en) presents one bit din, which the True/Inv multiplexer
// passes straight or inverted (inv = B(10)). Both blocks work on every
// operand at once:
//   AND Block  one register. The first operand of an equation (init = B(12))
//              loads it, which is the same as setting it to 1 and ANDing;
//              later operands AND into it, so the first 0 clears it.
//              Reset sets it to 1.
//   XOR Block  (SECOND = SBP_XOR) a 3-stage shift register of the last
//              three operands; its output is the XOR of the three stages.
//              It needs no initialisation: an XOR equation reads exactly
//              three operands (a 2-input XOR adds a constant 0).
//   OR Block   (SECOND = SBP_OR) one register, loaded by the first operand
//              and ORed with the later ones, so the first 1 sets it.
//              Reset sets it, like the AND register (both flip-flops are
//              drawn with a set input); the value is irrelevant to results
//              because the first operand of an equation loads it.
// Results are registered: after the operand read at clock t the outputs
// show the new value from clock t+1. Register behaviour, the init bit and
// B(10) follow the source description; the three-stage XOR combination and
// the reset values are this design's reading of it.
module single_bit_processor
  import prus_pkg::*;
#(
  parameter second_e SECOND = SBP_XOR
) (
  input  logic clk,
  input  logic rst,
  input  logic op_en,
  input  logic init,
  input  logic inv,
  input  logic din,
  output logic and_out,
  output logic second_out
);

  logic opnd;   // True/Inv multiplexer output
  assign opnd = inv ? !din : din;

  // AND Block
  always_ff @(posedge clk)
    if (rst)        and_out <= 1'b1;
    else if (op_en) and_out <= (init ? 1'b1 : and_out) & opnd;

  if (SECOND == SBP_XOR) begin : g_xor
    logic [2:0] sr;   // stage 0 holds the newest operand
    always_ff @(posedge clk)
      if (op_en) sr <= {sr[1:0], opnd};
    assign second_out = ^sr;
  end else begin : g_or
    logic or_q;
    always_ff @(posedge clk)
      if (rst)        or_q <= 1'b1;
      else if (op_en) or_q <= (init ? 1'b0 : or_q) | opnd;
    assign second_out = or_q;
  end

endmodule
