// output_decoder: the sequencer's external output bits OUT(0..N_OUT-1).
//
// Each output is a register. When en (Out_Dec_EN) is high, the bit selected
// by sel = B(3..0) takes d; all others keep their value, so an output holds
// until another instruction rewrites it. Reset clears all outputs. Sixteen
// outputs (the range of B(3..0)) is this design's default.
module output_decoder #(
  parameter int unsigned N_OUT = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [3:0]       sel,
  input  logic             d,
  output logic [N_OUT-1:0] out_bits
);

  always_ff @(posedge clk)
    if (rst)
      out_bits <= '0;
    else if (en && (32'(sel) < N_OUT))
      out_bits[sel] <= d;

endmodule
