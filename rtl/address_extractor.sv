// address_extractor: reads the flit at the head of an input FIFO (after any
// Trojan that sits behind the buffer) and recovers the fields the route
// computation and arbiter need: head bit, tail bit and destination address.
// It de-shuffles only those fields; the rest of the flit stays shuffled on its
// way through the crossbar. This design first applies the same single-error
// Hamming correction the output decoder will apply, so a flipped critical bit
// cannot misroute the packet inside this router. With SHUFFLE_EN = 0 the
// fields are read directly. Purely combinational.
module address_extractor
  import noc_pkg::*;
#(
  parameter bit SHUFFLE_EN = 1'b1
) (
  input  iflit_t            flit_i,
  output logic              head_o,
  output logic              tail_o,
  output logic [ADDR_W-1:0] dst_o,
  output logic              corrected_o
);
  flit_t body;
  crit_t repaired;
  crit_t restored;
  sel_t  sel;
  logic  corr;

  assign body = flit_i[FLIT_W-1:0];

  hamming_decoder          u_ham (.data_i(get_crit(body)), .parity_i(flit_i[IFLIT_W-1:FLIT_W]),
                                  .data_o(repaired), .corrected_o(corr));
  shuffle_pattern_selector u_sel (.data_i(body[POS_SELDAT +: 8]), .sel_o(sel));
  bit_deshuffler           u_dsh (.sel_i(sel), .crit_i(repaired), .crit_o(restored));

  if (SHUFFLE_EN) begin : g_on
    assign head_o      = restored[13];
    assign tail_o      = restored[0];
    assign dst_o       = restored[8:5];
    assign corrected_o = corr;
  end else begin : g_off
    assign head_o      = body[POS_H];
    assign tail_o      = body[POS_T];
    assign dst_o       = body[POS_DST +: ADDR_W];
    assign corrected_o = 1'b0;
  end
endmodule
