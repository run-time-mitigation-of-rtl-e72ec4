// tb_crossbar: random flits on the 5 inputs and random selects per output;
// every output must carry the flit of the input it selects.
module tb_crossbar;
  logic [4:0][54:0] fin, fout;
  logic [4:0][2:0]  sel;
  int checks = 0, failures = 0;

  crossbar dut (.in_flit(fin), .sel(sel), .out_flit(fout));

  initial begin
    repeat (1000) begin
      for (int i = 0; i < 5; i++) begin
        fin[i] = {23'($urandom()), $urandom()};
        sel[i] = 3'($urandom_range(0, 4));
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (fout[o] !== fin[sel[o]]) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d sel %0d", o, sel[o]);
        end
      end
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
