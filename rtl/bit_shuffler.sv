// bit_shuffler: multiplexer network that permutes the 14 critical flit bits
// (H, SRC, DST, QUAN, T) with one of 8 fixed patterns chosen by a 3-bit select.
// Output bit j takes input bit PERM_SRC[sel][j] (see noc_pkg). The pattern
// count and width follow the mitigation scheme; the patterns themselves are
// this design's choice: affine maps modulo 14 that move every bit.
// Purely combinational.
module bit_shuffler
  import noc_pkg::*;
(
  input  sel_t  sel_i,
  input  crit_t crit_i,
  output crit_t crit_o
);
  always_comb begin
    crit_o = '0;
    for (int p = 0; p < N_PATTERNS; p++)
      if (sel_i == sel_t'(p))
        for (int j = 0; j < CRIT_W; j++)
          crit_o[j] = crit_i[PERM_SRC[p][j]];
  end
endmodule
