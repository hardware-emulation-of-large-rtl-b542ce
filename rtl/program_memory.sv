// program_memory: instruction store of one sequencer.
//
// DEPTH words of 13 bits. The read port is addressed by the common address
// counter shared by every sequencer of the matrix and is asynchronous, so
// the instruction at address pc executes in the same clock. The write port
// loads the program before emulation starts (one word per clock when we=1).
// The memory is not cleared by reset, so a loaded program survives a reset
// of the matrix. The depth is not given by the source description; 2048 is
// this design's default.
module program_memory #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 13,
  localparam int unsigned AWD  = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic [AWD-1:0] raddr,
  output logic [W-1:0]   rdata,
  input  logic           we,
  input  logic [AWD-1:0] waddr,
  input  logic [W-1:0]   wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
