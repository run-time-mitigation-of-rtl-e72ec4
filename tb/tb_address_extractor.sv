// tb_address_extractor: random link flits are encoded with the reference
// encoder, optionally with one critical or parity bit flipped; the extractor
// must report the original head bit, tail bit and destination.
module tb_address_extractor;
  import tb_ref_pkg::*;
  logic [49:0] orig;
  logic [54:0] fi;
  logic        h, t, corr;
  logic [3:0]  dst;
  int checks = 0, failures = 0;
  int crit_pos [19] = '{0, 1, 2, 3, 4, 37, 38, 39, 40, 41, 42, 43, 44, 49, 50, 51, 52, 53, 54};

  address_extractor dut (.flit_i(fi), .head_o(h), .tail_o(t), .dst_o(dst), .corrected_o(corr));

  initial begin
    repeat (500) begin
      orig = rand_flit();
      for (int e = -1; e < 19; e++) begin
        fi = ref_encode(orig);
        if (e >= 0) fi[crit_pos[e]] = ~fi[crit_pos[e]];
        #1;
        checks++;
        if (h !== orig[49] || t !== orig[0] || dst !== orig[40:37] || corr !== (e >= 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL err=%0d h=%b t=%b dst=%h exp %b %b %h", e, h, t, dst, orig[49], orig[0], orig[40:37]);
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
