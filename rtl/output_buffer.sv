// output_buffer: the bit a sequencer offers to its eight neighbours (To NP).
//
// A register loaded with the SBP mux output whenever the instruction
// decoder raises load, and held until the next load, so neighbours can read
// it in any later clock the compiler chooses; there is no handshake. The
// value written at clock t is visible from clock t+1. Reset clears it.
module output_buffer (
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  logic d,
  output logic np_out
);

  always_ff @(posedge clk)
    if (rst)       np_out <= 1'b0;
    else if (load) np_out <= d;

endmodule
