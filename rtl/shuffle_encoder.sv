// shuffle_encoder: the first stage of every router input port. It gathers the
// 14 critical bits (H, SRC, DST, QUAN, T) of an incoming 50-bit flit, permutes
// them with the pattern chosen from the flit's own low payload byte, writes
// them back into the same critical positions and appends the 5 parity bits of
// a [19,14] Hamming code computed over the shuffled bits. The result is the
// 55-bit internal flit that is buffered and switched inside the router.
// With SHUFFLE_EN = 0 it degrades to the unprotected baseline (flit passed on,
// parity zero); the default is the protected router. Purely combinational.
module shuffle_encoder
  import noc_pkg::*;
#(
  parameter bit SHUFFLE_EN = 1'b1
) (
  input  flit_t  flit_i,
  output iflit_t flit_o
);
  sel_t    sel;
  crit_t   shuffled;
  parity_t parity;

  shuffle_pattern_selector u_sel (.data_i(flit_i[POS_SELDAT +: 8]), .sel_o(sel));
  bit_shuffler             u_shf (.sel_i(sel), .crit_i(get_crit(flit_i)), .crit_o(shuffled));
  hamming_encoder          u_ham (.data_i(shuffled), .parity_o(parity));

  if (SHUFFLE_EN) begin : g_on
    assign flit_o = {parity, put_crit(flit_i, shuffled)};
  end else begin : g_off
    assign flit_o = {{PAR_W{1'b0}}, flit_i};
  end
endmodule
