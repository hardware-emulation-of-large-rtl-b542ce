// data_memory: 1-bit-wide result store of one sequencer.
//
// Holds the values of emulated nets and flip-flops. Read is asynchronous at
// addr (the operand of the current instruction); write is synchronous when
// we (DM_WE) is high, so a stored result can be read from the next clock on.
// Reset clears every bit, which gives emulated flip-flops a known start
// value and gives programs a constant-0 source at any unwritten address.
// DEPTH 1024 follows the sequencer block diagram; clearing on reset is this
// design's choice.
module data_memory #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AWD  = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [AWD-1:0] addr,
  input  logic           we,
  input  logic           wdata,
  output logic           rdata
);

  logic [DEPTH-1:0] mem;

  always_ff @(posedge clk)
    if (rst)     mem       <= '0;
    else if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
