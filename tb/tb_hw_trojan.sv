// tb_hw_trojan: one Trojan of each kind. Random flits must pass untouched;
// flits carrying the trigger value in bits [28:13] must come out with
// exactly the targeted field changed: H inverted, T inverted, QUAN field bits
// [2:1] (flit bits [3:2]) inverted, or the DST x bits cleared.
module tb_hw_trojan;
  import noc_pkg::*;
  localparam logic [15:0] TRIG = 16'hC35A;
  logic [54:0] fi, fo_h, fo_t, fo_q, fo_a, fo_n;
  logic        f_h, f_t, f_q, f_a, f_n;
  int checks = 0, failures = 0;

  hw_trojan #(.KIND(TR_HEAD), .TRIG_VALUE(TRIG)) u_h (.flit_i(fi), .flit_o(fo_h), .fired_o(f_h));
  hw_trojan #(.KIND(TR_TAIL), .TRIG_VALUE(TRIG)) u_t (.flit_i(fi), .flit_o(fo_t), .fired_o(f_t));
  hw_trojan #(.KIND(TR_QUAN), .TRIG_VALUE(TRIG)) u_q (.flit_i(fi), .flit_o(fo_q), .fired_o(f_q));
  hw_trojan #(.KIND(TR_ADDR), .TRIG_VALUE(TRIG)) u_a (.flit_i(fi), .flit_o(fo_a), .fired_o(f_a));
  hw_trojan #(.KIND(TR_NONE), .TRIG_VALUE(TRIG)) u_n (.flit_i(fi), .flit_o(fo_n), .fired_o(f_n));

  task automatic expect_eq(logic [54:0] got, logic [54:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) begin
      logic trig;
      logic [54:0] e;
      trig = $urandom_range(0, 1) == 1;
      fi = {23'($urandom()), $urandom()};
      if (trig) fi[28:13] = TRIG;
      else if (fi[28:13] == TRIG) fi[13] = ~fi[13];
      #1;
      checks++;
      if ({f_h, f_t, f_q, f_a, f_n} !== {trig, trig, trig, trig, 1'b0}) begin
        failures++; $display("FAIL fired flags");
      end
      e = fi; if (trig) e[49] = ~e[49];        expect_eq(fo_h, e, "head");
      e = fi; if (trig) e[0] = ~e[0];          expect_eq(fo_t, e, "tail");
      e = fi; if (trig) e[3:2] = ~e[3:2];      expect_eq(fo_q, e, "quan");   // QUAN field bits [2:1]
      e = fi; if (trig) e[40:39] = 2'b00;      expect_eq(fo_a, e, "addr");
      expect_eq(fo_n, fi, "none");
    end
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
