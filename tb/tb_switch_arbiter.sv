// tb_switch_arbiter: directed wormhole scenarios on a 5-port arbiter.
//  1. two heads for the same free output: one grant, conflict flagged;
//  2. the winner's body flit keeps the output, the loser waits;
//  3. the tail releases the output and the loser gets it next cycle;
//  4. round robin: the next contest between the same two inputs goes the
//     other way;
//  5. a non-head flit on an idle input is dropped, not switched;
//  6. a full output FIFO stalls the grant;
//  7. a single-flit packet (head and tail) leaves no output held;
//  8. a packet whose tail never comes keeps its output, so a later head on
//     the same input follows it (packet mixing).
module tb_switch_arbiter;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid, in_head, in_tail, out_full;
  logic [4:0][2:0] in_port, out_sel;
  logic [4:0] in_pop, out_push, drop, conflict, stall;
  int checks = 0, failures = 0;

  switch_arbiter dut (.clk, .rst_n, .in_valid, .in_head, .in_tail, .in_port, .out_full,
                      .in_pop, .out_push, .out_sel, .drop, .conflict, .stall);

  always #5 clk = ~clk;

  task automatic idle();
    in_valid = '0; in_head = '0; in_tail = '0; in_port = '0; out_full = '0;
  endtask

  task automatic drive(int i, bit h, bit t, int port);
    in_valid[i] = 1'b1; in_head[i] = h; in_tail[i] = t; in_port[i] = 3'(port);
  endtask

  task automatic expect_cycle(string what, logic [4:0] pop, logic [4:0] push, int o, int sel_o,
                              logic [4:0] drp, logic [4:0] confl, logic [4:0] stl);
    #1;
    checks++;
    if (in_pop !== pop || out_push !== push || (o >= 0 && out_sel[o] !== 3'(sel_o)) ||
        drop !== drp || conflict !== confl || stall !== stl) begin
      failures++;
      $display("FAIL %s: pop=%b push=%b sel=%0d drop=%b confl=%b stall=%b", what, in_pop, out_push,
               (o >= 0) ? out_sel[o] : 0, drop, conflict, stall);
    end
    @(posedge clk);
    @(negedge clk);
    idle();
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. inputs 1 and 3 both want output 2
    drive(1, 1, 0, 2); drive(3, 1, 0, 2);
    expect_cycle("contest", 5'b00010, 5'b00100, 2, 1, 5'b0, 5'b00100, 5'b0);
    // 2. input 1 body (port field ignored), input 3 head waits
    drive(1, 0, 0, 0); drive(3, 1, 0, 2);
    expect_cycle("hold", 5'b00010, 5'b00100, 2, 1, 5'b0, 5'b0, 5'b0);
    // 3. input 1 tail releases
    drive(1, 0, 1, 0); drive(3, 1, 0, 2);
    expect_cycle("tail", 5'b00010, 5'b00100, 2, 1, 5'b0, 5'b0, 5'b0);
    drive(3, 1, 0, 2);
    expect_cycle("loser gets it", 5'b01000, 5'b00100, 2, 3, 5'b0, 5'b0, 5'b0);
    drive(3, 0, 1, 0);
    expect_cycle("loser tail", 5'b01000, 5'b00100, 2, 3, 5'b0, 5'b0, 5'b0);
    // 4. output 2 was last granted to input 3, so the search starts at input 4
    //    and wraps: input 1 wins, then input 3
    drive(1, 1, 1, 2); drive(3, 1, 1, 2);
    expect_cycle("rr after 3", 5'b00010, 5'b00100, 2, 1, 5'b0, 5'b00100, 5'b0);
    drive(1, 1, 1, 2); drive(3, 1, 1, 2);
    expect_cycle("rr after 1", 5'b01000, 5'b00100, 2, 3, 5'b0, 5'b00100, 5'b0);
    // 5. drop a headless flit on input 4
    drive(4, 0, 0, 1);
    expect_cycle("drop", 5'b10000, 5'b00000, -1, 0, 5'b10000, 5'b0, 5'b0);
    // 6. full output stalls
    drive(0, 1, 0, 3); out_full[3] = 1'b1;
    expect_cycle("stall", 5'b00000, 5'b00000, -1, 0, 5'b0, 5'b0, 5'b01000);
    drive(0, 1, 0, 3);
    expect_cycle("unstall", 5'b00001, 5'b01000, 3, 0, 5'b0, 5'b0, 5'b0);
    drive(0, 0, 1, 4);
    expect_cycle("close", 5'b00001, 5'b01000, 3, 0, 5'b0, 5'b0, 5'b0);
    // 7. single-flit packet leaves output 3 free for input 2
    drive(0, 1, 1, 3);
    expect_cycle("single", 5'b00001, 5'b01000, 3, 0, 5'b0, 5'b0, 5'b0);
    drive(2, 1, 0, 3);
    expect_cycle("free after single", 5'b00100, 5'b01000, 3, 2, 5'b0, 5'b0, 5'b0);
    // 8. input 2 never sends a tail: its next head still goes to output 3
    drive(2, 1, 0, 0);
    expect_cycle("mixing", 5'b00100, 5'b01000, 3, 2, 5'b0, 5'b0, 5'b0);
    drive(1, 1, 0, 3);
    expect_cycle("output held", 5'b00000, 5'b00000, -1, 0, 5'b0, 5'b0, 5'b0);

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
