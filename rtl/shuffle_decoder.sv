// shuffle_decoder: the last stage of every router output port, the reciprocal
// of shuffle_encoder. It checks the 14 shuffled critical bits of a 55-bit
// internal flit against their [19,14] Hamming parity and repairs a single
// flipped bit, recomputes the shuffle select from the untouched low payload
// byte, and moves the critical bits back to their places, giving the original
// 50-bit flit for the link. corrected_o reports a non-zero syndrome.
// With SHUFFLE_EN = 0 the parity is ignored and the flit passes unchanged.
// Purely combinational.
module shuffle_decoder
  import noc_pkg::*;
#(
  parameter bit SHUFFLE_EN = 1'b1
) (
  input  iflit_t flit_i,
  output flit_t  flit_o,
  output logic   corrected_o
);
  flit_t   body;
  crit_t   repaired;
  crit_t   restored;
  sel_t    sel;
  logic    corr;

  assign body = flit_i[FLIT_W-1:0];

  hamming_decoder          u_ham (.data_i(get_crit(body)), .parity_i(flit_i[IFLIT_W-1:FLIT_W]),
                                  .data_o(repaired), .corrected_o(corr));
  shuffle_pattern_selector u_sel (.data_i(body[POS_SELDAT +: 8]), .sel_o(sel));
  bit_deshuffler           u_dsh (.sel_i(sel), .crit_i(repaired), .crit_o(restored));

  if (SHUFFLE_EN) begin : g_on
    assign flit_o      = put_crit(body, restored);
    assign corrected_o = corr;
  end else begin : g_off
    assign flit_o      = body;
    assign corrected_o = 1'b0;
  end
endmodule
