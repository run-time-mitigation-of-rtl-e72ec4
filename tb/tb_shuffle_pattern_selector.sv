// tb_shuffle_pattern_selector: exhaustive check of the 3-bit shuffle select
// over all 256 values of the payload byte, against the XOR-fold reference,
// and a check that every one of the 8 patterns is reachable.
module tb_shuffle_pattern_selector;
  import tb_ref_pkg::*;
  logic [7:0] d;
  logic [2:0] s;
  int checks = 0, failures = 0;
  logic [7:0] seen = '0;

  shuffle_pattern_selector dut (.data_i(d), .sel_o(s));

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      checks++;
      if (s !== ref_sel(d)) begin
        failures++;
        $display("FAIL d=%h sel=%0d exp=%0d", d, s, ref_sel(d));
      end
      seen[s] = 1'b1;
    end
    checks++;
    if (seen != 8'hFF) begin failures++; $display("FAIL patterns reached %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
