// prus_pkg: instruction word layout and shared types of the PRUS sequencer.
//
// A sequencer executes one 13-bit instruction word B(12..0) per clock. The
// bit positions that drive the datapath follow the sequencer block diagram:
// B(9..0) is the Data Memory address, B(3..0) selects the Input Multiplexer
// and Output Decoder line, B(10) drives the True/Inv multiplexer, B(12..10)
// drives the SBP multiplexer and B(12) (the highest bit) starts a new
// equation. How the remaining combinations map onto instructions is this
// design's own encoding:
//
//   B(11) = 0  READ   operand read.  B(12)=INIT, B(10)=INV, B(9..0)=source
//   B(11) = 1  OUTPUT result write.  B(12..10) = SBP mux code:
//                 010 ANDT  AND register            -> destination B(9..0)
//                 011 ANDI  inverted AND register   -> destination B(9..0)
//                 110 XOR   XOR block               -> destination B(9..0)
//                 111 PASS  input-mux bit at source B(9..0) -> neighbours only
//
//   Source/destination address space (10 bits):
//     0x000-0x3EF  Data Memory bit
//     0x3F0-0x3FF  external: on a read or PASS, B(3..0)=0..7 is IN(0..7) and
//                  8..15 is NP(0..7); on a write, OUT(B(3..0)).
//   Special instructions (PASS with source 0x3E0-0x3EF):
//     B(0)=0 NOOP, B(0)=1 END (resets the common address counter).
//   Every OUTPUT instruction except NOOP/END also loads the Output Buffer.
package prus_pkg;

  localparam int unsigned IW       = 13;   // instruction width, B(12..0)
  localparam int unsigned AW       = 10;   // address field, B(9..0)
  localparam int unsigned N_NP     = 8;    // neighbours per processor

  typedef logic [IW-1:0] instr_t;

  // SBP multiplexer codes, B(12..10)
  typedef enum logic [2:0] {
    SBP_ANDT = 3'b010,
    SBP_ANDI = 3'b011,
    SBP_XORB = 3'b110,
    SBP_PASS = 3'b111
  } sbp_sel_e;

  // Second register of the single bit processor
  typedef enum logic {
    SBP_XOR = 1'b0,   // XOR block (shift register)
    SBP_OR  = 1'b1    // OR block
  } second_e;

  // Address-space markers on B(9..4)
  localparam logic [5:0] EXT_PAGE  = 6'h3F;
  localparam logic [5:0] SPEC_PAGE = 6'h3E;

  // Decoded control signals
  typedef struct packed {
    logic       op_en;       // operand read this clock
    logic       init;        // start of a new equation
    logic       inv;         // take the inverse of the operand
    logic       mux_en;      // InMux takes IN/NP instead of Data Memory
    logic       dm_we;       // write result to Data Memory
    logic       out_dec_en;  // write result to OUT(B(3..0))
    logic       ob_load;     // load the Output Buffer (To NP)
    logic       end_instr;   // END: reset the common address counter
    logic       noop;        // NOOP
    logic [2:0] sbp_sel;     // SBP mux code
  } ctl_t;

  // Instruction builders, used by programs written in SystemVerilog
  function automatic instr_t i_read(input logic init, input logic inv,
                                    input logic [AW-1:0] src);
    return {init, 1'b0, inv, src};
  endfunction

  function automatic instr_t i_write(input sbp_sel_e sel, input logic [AW-1:0] dst);
    return {sel, dst};
  endfunction

  function automatic logic [AW-1:0] a_in(input logic [2:0] k);    // IN(k)
    return {EXT_PAGE, 1'b0, k};
  endfunction

  function automatic logic [AW-1:0] a_np(input logic [2:0] k);    // NP(k)
    return {EXT_PAGE, 1'b1, k};
  endfunction

  function automatic logic [AW-1:0] a_out(input logic [3:0] k);   // OUT(k)
    return {EXT_PAGE, k};
  endfunction

  localparam instr_t I_NOOP = {SBP_PASS, SPEC_PAGE, 4'h0};
  localparam instr_t I_END  = {SBP_PASS, SPEC_PAGE, 4'h1};

endpackage
