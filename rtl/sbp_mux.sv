// sbp_mux: single-bit-processor output multiplexer.
//
// Selects the sequencer's result bit by the 3-bit code B(12..10):
// ANDT (AND register), ANDI (inverted AND register), XOR block output, or
// PASS (the input-multiplexer bit, for fast forwarding to the neighbours).
// Any other code yields 0. Combinational. The four sources follow the
// source description; the code values are this design's choice.
module sbp_mux
  import prus_pkg::*;
(
  input  logic [2:0] sel,
  input  logic       and_q,
  input  logic       xor_q,
  input  logic       mux_d,
  output logic       y
);

  always_comb begin
    unique case (sel)
      SBP_ANDT: y = and_q;
      SBP_ANDI: y = !and_q;
      SBP_XORB: y = xor_q;
      SBP_PASS: y = mux_d;
      default:  y = 1'b0;
    endcase
  end

endmodule
