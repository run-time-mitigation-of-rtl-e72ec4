// tb_route_computation: every router position of the 4x4 mesh against every
// destination; the port must follow XY order (x first, then y, then local).
module tb_route_computation;
  import noc_pkg::*;
  logic [1:0] mx, my;
  logic [3:0] d;
  port_e      p;
  int checks = 0, failures = 0;

  route_computation dut (.my_x(mx), .my_y(my), .dst_i(d), .port_o(p));

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int dx = 0; dx < 4; dx++)
          for (int dy = 0; dy < 4; dy++) begin
            int exp;
            mx = 2'(x); my = 2'(y); d = {2'(dx), 2'(dy)};
            #1;
            if (dx > x)      exp = 2;   // east
            else if (dx < x) exp = 4;   // west
            else if (dy > y) exp = 3;   // south
            else if (dy < y) exp = 1;   // north
            else             exp = 0;   // local
            checks++;
            if (int'(p) != exp) begin
              failures++;
              $display("FAIL at (%0d,%0d) dst (%0d,%0d) port=%0d exp=%0d", x, y, dx, dy, p, exp);
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
