// tb_bit_shuffler: for each of the 8 selects, pushes every one-hot vector and 200
// random vectors through the bit_shuffler and compares with the reference
// permutation; also checks that no pattern leaves any bit in place.
module tb_bit_shuffler;
  import tb_ref_pkg::*;
  logic [2:0]  s;
  logic [13:0] ci, co;
  int checks = 0, failures = 0;

  bit_shuffler dut (.sel_i(s), .crit_i(ci), .crit_o(co));

  task automatic check_one();
    #1;
    checks++;
    if (co !== ref_shuffle(s, ci)) begin
      failures++;
      $display("FAIL sel=%0d in=%b out=%b exp=%b", s, ci, co, ref_shuffle(s, ci));
    end
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin
      s = 3'(p);
      for (int b = 0; b < 14; b++) begin
        ci = 14'(1) << b;
        check_one();
        checks++;
        if (co == ci) begin failures++; $display("FAIL sel=%0d keeps bit %0d", p, b); end
      end
      repeat (200) begin
        ci = 14'($urandom());
        check_one();
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
