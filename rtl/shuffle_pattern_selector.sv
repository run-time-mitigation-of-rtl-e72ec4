// shuffle_pattern_selector: picks which of the 8 pre-planned shuffle patterns a
// flit uses, from the 8 least significant payload data lines of that flit.
// Because those lines are never shuffled, the decoder at the router output can
// recompute the same select from the flit it receives, so no key travels with
// the flit and the pattern changes from flit to flit.
// The select is an XOR fold, sel = d[2:0] ^ d[5:3] ^ {0, d[7:6]}: the 8-bit in,
// 3-bit out sizes follow the mitigation scheme, the fold is this design's choice.
// Purely combinational.
module shuffle_pattern_selector
  import noc_pkg::*;
(
  input  logic [7:0] data_i,
  output sel_t       sel_o
);
  assign sel_o = data_i[2:0] ^ data_i[5:3] ^ {1'b0, data_i[7:6]};
endmodule
