// instr_decoder: turns one PRUS instruction word into the sequencer's
// control signals.
//
// Purely combinational. B(11) separates operand reads (0) from result
// writes (1). For a read, B(12) starts a new equation and B(10) selects the
// inverted operand; a source address in 0x3F0-0x3FF raises Mux_EN so the
// input multiplexer takes IN/NP instead of the Data Memory. For a write,
// B(12..10) is the SBP mux code: ANDT/ANDI/XOR results go to the Data Memory
// (DM_WE) or, for 0x3F0-0x3FF, to the Output Decoder (Out_Dec_EN); PASS
// forwards the input-mux bit to the neighbours. PASS from 0x3E0-0x3EF is a
// special instruction: NOOP, or END when B(0)=1. END raises End_Instr, which
// resets the common address counter. The set of control outputs (DM_WE,
// Out_Dec_EN, End_Instr, Mux_EN) follows the sequencer block diagram; the
// encoding itself is this design's choice (see prus_pkg).
module instr_decoder
  import prus_pkg::*;
(
  input  instr_t instr,
  output ctl_t   ctl
);

  logic        is_write;
  logic [5:0]  page;
  logic        ext;
  logic        special;

  always_comb begin
    is_write = instr[11];
    page     = instr[9:4];
    ext      = (page == EXT_PAGE);
    special  = is_write && (instr[12:10] == SBP_PASS) && (page == SPEC_PAGE);

    ctl            = '0;
    ctl.sbp_sel    = instr[12:10];
    ctl.inv        = instr[10];
    if (!is_write) begin
      ctl.op_en  = 1'b1;
      ctl.init   = instr[12];
      ctl.mux_en = ext;
    end else if (special) begin
      ctl.end_instr = instr[0];
      ctl.noop      = !instr[0];
    end else if (instr[12:10] == SBP_PASS) begin
      ctl.mux_en  = ext;
      ctl.ob_load = 1'b1;
    end else begin
      // ANDT, ANDI, XOR (the only other codes with B(11)=1)
      ctl.ob_load    = 1'b1;
      ctl.dm_we      = !ext;
      ctl.out_dec_en = ext;
    end
  end

  // an instruction does exactly one kind of thing
  always_comb
    assert (32'(ctl.op_en) + 32'(ctl.dm_we) + 32'(ctl.out_dec_en) +
            32'(ctl.end_instr) + 32'(ctl.noop) + 32'(ctl.ob_load && !ctl.dm_we && !ctl.out_dec_en) == 1)
      else $error("instr_decoder: instruction %h does not decode to exactly one action", instr);

endmodule
