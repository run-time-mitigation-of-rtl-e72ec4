// tb_shuffle_encoder: 2000 random link flits; the 55-bit internal flit must
// equal the reference encoding (critical bits shuffled by the select taken
// from bits [12:5], the rest unchanged, Hamming parity on top). Also checks
// that the field positions of the encoded flit differ from the plain flit
// for most flits, i.e. that the fields really are moved.
module tb_shuffle_encoder;
  import tb_ref_pkg::*;
  logic [49:0] fi;
  logic [54:0] fo;
  int checks = 0, failures = 0, moved = 0;

  shuffle_encoder dut (.flit_i(fi), .flit_o(fo));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      fi = rand_flit();
      #1;
      checks++;
      if (fo !== ref_encode(fi)) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h out=%h exp=%h", fi, fo, ref_encode(fi));
      end
      if (fo[49:0] != fi) moved++;
    end
    checks++;
    if (moved < 1900) begin failures++; $display("FAIL only %0d flits changed", moved); end
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
