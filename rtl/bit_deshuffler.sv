// bit_deshuffler: exact inverse of bit_shuffler. Shuffled bit j goes back to
// position PERM_SRC[sel][j]. Given the same 3-bit select it restores the 14
// critical bits to their original order. Purely combinational.
module bit_deshuffler
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
          crit_o[PERM_SRC[p][j]] = crit_i[j];
  end
endmodule
