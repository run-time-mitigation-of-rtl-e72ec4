// tb_hamming_encoder: all 16384 data words; the parity must equal the XOR of
// the codeword positions of the data bits that are 1.
module tb_hamming_encoder;
  import tb_ref_pkg::*;
  logic [13:0] d;
  logic [4:0]  p;
  int checks = 0, failures = 0;

  hamming_encoder dut (.data_i(d), .parity_o(p));

  initial begin
    for (int v = 0; v < 16384; v++) begin
      d = 14'(v);
      #1;
      checks++;
      if (p !== ref_parity(d)) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h p=%h exp=%h", d, p, ref_parity(d));
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
