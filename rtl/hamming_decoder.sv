// hamming_decoder: corrects a single flipped bit among the 14 shuffled critical
// bits of a [19,14] Hamming codeword. The syndrome (received parity xor the
// parity recomputed from the received data) is the codeword position of the
// flipped bit; if it names a data position that bit is inverted. A flipped
// parity bit needs no repair. Two or more errors are beyond the code and are
// miscorrected or passed on. corrected_o flags any non-zero syndrome.
// Purely combinational.
module hamming_decoder
  import noc_pkg::*;
(
  input  crit_t   data_i,
  input  parity_t parity_i,
  output crit_t   data_o,
  output logic    corrected_o
);
  parity_t recomputed;
  parity_t syndrome;

  hamming_encoder u_recompute (.data_i(data_i), .parity_o(recomputed));

  assign syndrome    = parity_i ^ recomputed;
  assign corrected_o = (syndrome != '0);

  always_comb begin
    data_o = data_i;
    for (int i = 0; i < CRIT_W; i++)
      if (32'(syndrome) == HAM_POS[i]) data_o[i] = ~data_i[i];
  end
endmodule
