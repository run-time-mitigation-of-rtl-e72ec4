// hamming_encoder: parity generator of the [19,14] single-error-correcting
// Hamming code that protects the 14 shuffled critical bits. Data bit i sits at
// codeword position HAM_POS[i] (3,5,6,7,9..15,17,18,19); parity bit k covers
// every position whose binary index has bit k set. The code size follows the
// mitigation scheme, the standard positional construction is this design's
// choice. Purely combinational.
module hamming_encoder
  import noc_pkg::*;
(
  input  crit_t   data_i,
  output parity_t parity_o
);
  always_comb begin
    parity_o = '0;
    for (int k = 0; k < PAR_W; k++)
      for (int i = 0; i < CRIT_W; i++)
        if (((HAM_POS[i] >> k) & 1) == 1) parity_o[k] = parity_o[k] ^ data_i[i];
  end
endmodule
