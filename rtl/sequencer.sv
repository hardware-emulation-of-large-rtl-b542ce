// sequencer: one PRUS logic processor.
//
// A sequencer has no jumps or branches: it executes the instruction at the
// common address pc every clock, so all sequencers of a matrix run in lock
// step and a compiler can know exactly when a result appears on a
// neighbour link. Datapath per clock:
//   program_memory[pc] -> instr_decoder -> controls
//   in_mux picks Data Memory[B(9..0)], IN(0..7) or NP(0..7)
//   single_bit_processor folds the operand into its AND and XOR registers
//   sbp_mux picks ANDT / ANDI / XOR / input bit as the result, which goes to
//   the Data Memory (DM_WE), the Output Decoder (Out_Dec_EN) and the Output
//   Buffer that feeds the neighbours (To NP).
// Writes take effect at the clock edge ending the instruction, so a result
// written at clock t can be read, locally or by a neighbour, from clock t+1.
// The block structure and its wiring follow the sequencer block diagram;
// single-cycle execution and the instruction encoding are this design's.
module sequencer
  import prus_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 2048,
  parameter int unsigned DM_DEPTH = 1024,
  parameter int unsigned N_IN     = 8,
  parameter int unsigned N_OUT    = 16,
  parameter second_e     SECOND   = SBP_XOR,
  localparam int unsigned PAW     = $clog2(PM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [PAW-1:0]   pc,
  input  logic             pm_we,
  input  logic [PAW-1:0]   pm_waddr,
  input  instr_t           pm_wdata,
  input  logic [N_IN-1:0]  in_bits,
  input  logic [N_NP-1:0]  np_in,
  output logic             np_out,
  output logic [N_OUT-1:0] out_bits,
  output logic             end_instr
);

  localparam int unsigned DAW = $clog2(DM_DEPTH);

  // the instruction word addresses at most 1024 data-memory bits
  if (DM_DEPTH > 1024 || DM_DEPTH < 2) begin : g_bad_depth
    $error("sequencer: DM_DEPTH must be 2..1024");
  end

  instr_t instr;
  ctl_t   ctl;
  logic   dm_q, mux_q, and_q, sec_q, res;
  logic [7:0] in8;

  // IN(0..7) as seen by the input multiplexer; absent inputs read 0
  always_comb begin
    in8 = '0;
    for (int k = 0; k < 8; k++)
      if (k < int'(N_IN)) in8[k] = in_bits[k];
  end

  program_memory #(.DEPTH(PM_DEPTH), .W(IW)) u_pm (
    .clk, .raddr(pc), .rdata(instr),
    .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata)
  );

  instr_decoder u_dec (.instr, .ctl);

  data_memory #(.DEPTH(DM_DEPTH)) u_dm (
    .clk, .rst, .addr(instr[DAW-1:0]), .we(ctl.dm_we), .wdata(res), .rdata(dm_q)
  );

  in_mux u_inmux (
    .sel(instr[3:0]), .mux_en(ctl.mux_en), .in_bits(in8), .np_in,
    .dm_bit(dm_q), .y(mux_q)
  );

  single_bit_processor #(.SECOND(SECOND)) u_sbp (
    .clk, .rst, .op_en(ctl.op_en), .init(ctl.init), .inv(ctl.inv),
    .din(mux_q), .and_out(and_q), .second_out(sec_q)
  );

  sbp_mux u_sbpmux (
    .sel(ctl.sbp_sel), .and_q, .xor_q(sec_q), .mux_d(mux_q), .y(res)
  );

  output_buffer u_ob (
    .clk, .rst, .load(ctl.ob_load), .d(res), .np_out
  );

  output_decoder #(.N_OUT(N_OUT)) u_od (
    .clk, .rst, .en(ctl.out_dec_en), .sel(instr[3:0]), .d(res), .out_bits
  );

  assign end_instr = ctl.end_instr;

endmodule
