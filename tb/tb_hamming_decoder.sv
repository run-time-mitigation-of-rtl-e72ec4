// tb_hamming_decoder: random data words are encoded with the reference code,
// then passed clean or with one of the 19 codeword bits flipped. The decoder
// must return the original data every time and raise corrected_o exactly
// when a bit was flipped.
module tb_hamming_decoder;
  import tb_ref_pkg::*;
  logic [13:0] di, dorig, dout;
  logic [4:0]  pi;
  logic        corr;
  int checks = 0, failures = 0;

  hamming_decoder dut (.data_i(di), .parity_i(pi), .data_o(dout), .corrected_o(corr));

  initial begin
    repeat (300) begin
      dorig = 14'($urandom());
      for (int e = -1; e < 19; e++) begin
        di = dorig;
        pi = ref_parity(dorig);
        if (e >= 0 && e < 14) di[e] = ~di[e];
        if (e >= 14)          pi[e-14] = ~pi[e-14];
        #1;
        checks++;
        if (dout !== dorig || corr !== (e >= 0)) begin
          failures++;
          if (failures < 10) $display("FAIL err=%0d out=%h exp=%h corr=%b", e, dout, dorig, corr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
