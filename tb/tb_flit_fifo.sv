// tb_flit_fifo: random pushes and pops against a queue model for 5000 cycles,
// checking the show-ahead head, full and empty every cycle; then fills the
// FIFO to check that it holds exactly DEPTH = 8 flits, and that a flit pushed
// into an empty FIFO is readable one cycle later.
module tb_flit_fifo;
  logic        clk = 0, rst_n = 0;
  logic        wr_en, rd_en, full, empty;
  logic [54:0] wd, rd;
  logic [54:0] q [$];
  int checks = 0, failures = 0, nfill, sz;

  flit_fifo dut (.clk, .rst_n, .wr_en, .wr_data(wd), .rd_en, .rd_data(rd), .full, .empty);

  always #5 clk = ~clk;

  task automatic check_state();
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == 8) || (q.size() > 0 && rd !== q[0])) begin
      failures++;
      if (failures < 10) $display("FAIL size=%0d empty=%b full=%b rd=%h", q.size(), empty, full, rd);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 5000; c++) begin
      check_state();
      wr_en = ($urandom_range(0, 99) < ((c / 500) % 2 ? 70 : 40));
      rd_en = ($urandom_range(0, 99) < ((c / 500) % 2 ? 40 : 70));
      wd    = {23'($urandom()), $urandom()};
      @(posedge clk);
      sz = q.size();
      if (rd_en && sz > 0) void'(q.pop_front());
      if (wr_en && sz < 8) q.push_back(wd);
      @(negedge clk);
    end
    // Drain, then fill until full.
    wr_en = 0; rd_en = 1;
    repeat (10) @(negedge clk);
    q.delete();
    rd_en = 0; wr_en = 1; nfill = 0;
    while (!full && nfill < 20) begin
      wd = 55'(nfill);
      @(negedge clk);
      nfill++;
    end
    checks++;
    if (nfill != 8) begin failures++; $display("FAIL depth %0d", nfill); end
    // Latency: push into empty, visible next cycle.
    wr_en = 0; rd_en = 1;
    repeat (10) @(negedge clk);
    rd_en = 0; wr_en = 1; wd = 55'h1234;
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (empty || rd !== 55'h1234) begin failures++; $display("FAIL one-cycle latency"); end
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
