// in_mux: input multiplexer of a sequencer.
//
// When mux_en (Mux_EN) is high it selects, by sel = B(3..0), one of the
// eight external input bits IN(0..7) (sel 0-7) or one of the eight
// neighbour outputs NP(0..7) (sel 8-15). Otherwise it passes the Data Memory
// bit. Combinational. The split of sel into IN and NP halves is this
// design's choice.
module in_mux (
  input  logic [3:0] sel,
  input  logic       mux_en,
  input  logic [7:0] in_bits,
  input  logic [7:0] np_in,
  input  logic       dm_bit,
  output logic       y
);

  always_comb begin
    if (!mux_en)     y = dm_bit;
    else if (sel[3]) y = np_in[sel[2:0]];
    else             y = in_bits[sel[2:0]];
  end

endmodule
