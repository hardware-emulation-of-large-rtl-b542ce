// prus_matrix: the PRUS processor network (top level).
//
// ROWS x COLS sequencers on a torus: every sequencer is linked to its eight
// neighbours (N, NE, E, SE, S, SW, W, NW), and the edges wrap around in both
// directions. Each sequencer reads its neighbours' Output Buffers as
// NP(0..7) in that order. One address counter drives the program memories of
// all sequencers, so the whole network executes in lock step and data moves
// between processors without handshakes; a compiler schedules each read for
// a clock after the producing write. The END instruction of any sequencer
// resets the counter (programs place END at the same address), which closes
// one emulation cycle and pulses cycle_done. An assertion flags programs
// whose END addresses differ.
//
// Programming: while run is low, write instruction words with prog_we,
// choosing the sequencer (prog_sel = row*COLS + col) and the word address.
// Then assert rst for one clock to clear data memories and registers, and
// raise run. External inputs ext_in[p] are IN(0..N_IN-1) and ext_out[p] are
// OUT(0..N_OUT-1) of sequencer p.
//
// SECOND chooses the second register of every single bit processor: the
// XOR block (default) or the OR block variant.
//
// The 8x8 default is the 64-processor network of the source; the torus
// wiring follows its matrix drawing. The neighbour order, the ORing of END
// and the programming port are this design's choices.
module prus_matrix
  import prus_pkg::*;
#(
  parameter int unsigned ROWS     = 8,
  parameter int unsigned COLS     = 8,
  parameter int unsigned PM_DEPTH = 2048,
  parameter int unsigned DM_DEPTH = 1024,
  parameter int unsigned N_IN     = 8,
  parameter int unsigned N_OUT    = 16,
  parameter second_e     SECOND   = SBP_XOR,
  localparam int unsigned NP      = ROWS * COLS,
  localparam int unsigned PAW     = $clog2(PM_DEPTH),
  localparam int unsigned SW      = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       run,
  input  logic                       prog_we,
  input  logic [SW-1:0]              prog_sel,
  input  logic [PAW-1:0]             prog_addr,
  input  instr_t                     prog_data,
  input  logic [NP-1:0][N_IN-1:0]    ext_in,
  output logic [NP-1:0][N_OUT-1:0]   ext_out,
  output logic [PAW-1:0]             pc,
  output logic                       cycle_done
);

  logic [NP-1:0] np_out;
  logic [NP-1:0] end_v;

  address_counter #(.DEPTH(PM_DEPTH)) u_ac (
    .clk, .rst, .run, .end_instr(|end_v), .pc, .cycle_done
  );

  // programs must end together: END in one sequencer means END in all
  always_ff @(posedge clk)
    if (!rst && run)
      assert (end_v == '0 || &end_v)
        else $error("prus_matrix: END reached by only some sequencers (%b)", end_v);

  // neighbour offsets (row, col) in NP order N, NE, E, SE, S, SW, W, NW
  localparam int DR [8] = '{-1, -1,  0,  1,  1,  1,  0, -1};
  localparam int DC [8] = '{ 0,  1,  1,  1,  0, -1, -1, -1};

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned P = r * COLS + c;
      logic [N_NP-1:0] np_in;

      for (genvar k = 0; k < 8; k++) begin : g_nb
        localparam int unsigned RR = (r + int'(ROWS) + DR[k]) % int'(ROWS);
        localparam int unsigned CC = (c + int'(COLS) + DC[k]) % int'(COLS);
        assign np_in[k] = np_out[RR * COLS + CC];
      end

      sequencer #(
        .PM_DEPTH(PM_DEPTH), .DM_DEPTH(DM_DEPTH), .N_IN(N_IN), .N_OUT(N_OUT),
        .SECOND(SECOND)
      ) u_seq (
        .clk, .rst, .pc,
        .pm_we(prog_we && (32'(prog_sel) == P)),
        .pm_waddr(prog_addr), .pm_wdata(prog_data),
        .in_bits(ext_in[P]), .np_in,
        .np_out(np_out[P]), .out_bits(ext_out[P]), .end_instr(end_v[P])
      );
    end
  end

endmodule
