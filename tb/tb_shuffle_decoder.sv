// tb_shuffle_decoder: random link flits are encoded with the reference
// encoder; the decoder must give back the original flit, both when the
// internal flit is clean and when any one of its 14 critical positions or 5
// parity bits has been flipped (a Trojan-style single-bit attack), and flag
// the correction. A flip of a payload bit outside the critical fields is
// not the code's job and must come out as that flip, with the fields intact.
module tb_shuffle_decoder;
  import tb_ref_pkg::*;
  logic [49:0] orig, fo;
  logic [54:0] fi;
  logic        corr;
  int checks = 0, failures = 0;
  int crit_pos [19] = '{0, 1, 2, 3, 4, 37, 38, 39, 40, 41, 42, 43, 44, 49, 50, 51, 52, 53, 54};

  shuffle_decoder dut (.flit_i(fi), .flit_o(fo), .corrected_o(corr));

  initial begin
    repeat (300) begin
      orig = rand_flit();
      for (int e = -1; e < 19; e++) begin
        fi = ref_encode(orig);
        if (e >= 0) fi[crit_pos[e]] = ~fi[crit_pos[e]];
        #1;
        checks++;
        if (fo !== orig || corr !== (e >= 0)) begin
          failures++;
          if (failures < 10) $display("FAIL err=%0d out=%h exp=%h corr=%b", e, fo, orig, corr);
        end
      end
      // A payload bit (bit 30) outside the selector byte and the critical fields.
      fi = ref_encode(orig);
      fi[30] = ~fi[30];
      #1;
      checks++;
      if (fo !== (orig ^ (50'(1) << 30)) || corr) begin
        failures++;
        $display("FAIL payload flip out=%h", fo);
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
