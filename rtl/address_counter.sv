// address_counter: the common program address of the whole matrix.
//
// Every sequencer's program memory is read at pc, so all sequencers step
// through their programs in lock step. While run is high pc advances by one
// each clock; end_instr (END_INSTR of the executing instruction) returns it
// to 0 instead and raises cycle_done for that clock, marking the end of one
// emulation cycle. Without an END the counter wraps after DEPTH-1. Reset
// sets pc to 0.
module address_counter #(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AWD  = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           run,
  input  logic           end_instr,
  output logic [AWD-1:0] pc,
  output logic           cycle_done
);

  always_ff @(posedge clk)
    if (rst)                  pc <= '0;
    else if (run && end_instr) pc <= '0;
    else if (run)             pc <= (32'(pc) == DEPTH-1) ? '0 : pc + 1'b1;

  assign cycle_done = run && end_instr;

endmodule
