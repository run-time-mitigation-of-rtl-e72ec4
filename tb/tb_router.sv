// tb_router: one router at mesh position (1,1) with the default Head Trojan
// and shuffle protection. Each of the 5 inputs is fed 5-flit packets for
// random destinations; one packet in four carries the Trojan trigger in all
// of its flits. Output ports are randomly back-pressured. Checks:
//  * every packet leaves through the XY port for its destination, its flits
//    contiguous on that port and bit-exact (the Trojan's flips are repaired);
//  * all packets come out;
//  * an uncontended flit accepted at cycle t is valid at the output at t+2;
//  * the Trojan fired, the output decoder corrected, outputs were contested
//    and stalled at least once each.
module tb_router;
  import noc_pkg::*;
  localparam logic [15:0] TRIG = 16'hC35A;
  localparam int NPKT = 60;   // per input

  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [4:0] in_flit, out_flit;
  router_events_t ev;
  int checks = 0, failures = 0;
  flit_t q [5][$];
  int got_idx [5];
  int got_pid [5];
  int n_done = 0;
  int n_fired = 0, n_corr = 0, n_confl = 0, n_stall = 0;
  bit lat_mode = 1;

  router dut (.clk, .rst_n, .my_x(2'd1), .my_y(2'd1), .in_valid, .in_flit, .in_ready,
              .out_valid, .out_flit, .out_ready, .events(ev));

  always #5 clk = ~clk;

  // Packet pid (0..299): input = pid / NPKT. Destination and content are a
  // function of pid, so the monitor can rebuild them.
  function automatic logic [3:0] pkt_dst(int pid);
    int h = (pid * 2654435761) >>> 7;
    return 4'(h);
  endfunction
  function automatic bit pkt_trig(int pid);
    return (pid % 4) == 1;
  endfunction
  function automatic flit_t mk_flit(int pid, int k);
    flit_t f;
    int unsigned r = 32'(pid) * 32'h9E3779B1 + 32'(k) * 32'h85EBCA6B;
    f = {r[17:0], r};
    f[36:29] = 8'(pid);
    f[48:45] = 4'(pid >> 8);
    if (f[28:13] == TRIG) f[13] = ~f[13];
    if (pkt_trig(pid)) f[28:13] = TRIG;
    f[49] = (k == 0);
    f[0]  = (k == 4);
    if (k == 0) begin
      f[40:37] = pkt_dst(pid);
      f[4:1]   = 4'd5;
    end
    return f;
  endfunction
  function automatic int xy_port(logic [3:0] d);
    if (d[3:2] > 2'd1) return 2;
    if (d[3:2] < 2'd1) return 4;
    if (d[1:0] > 2'd1) return 3;
    if (d[1:0] < 2'd1) return 1;
    return 0;
  endfunction

  // Drivers.
  always_ff @(posedge clk) begin
    for (int i = 0; i < 5; i++) begin
      if (in_valid[i] && in_ready[i]) void'(q[i].pop_front());
    end
  end
  always_comb
    for (int i = 0; i < 5; i++) begin
      in_valid[i] = rst_n && q[i].size() > 0;
      in_flit[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end

  // Monitors.
  always @(posedge clk) if (rst_n) begin
    n_fired += $countones(ev.trojan_fired);
    n_corr  += $countones(ev.ecc_corrected);
    n_confl += $countones(ev.arb_conflict);
    n_stall += $countones(ev.stalled);
    if (!lat_mode)
      out_ready <= 5'($urandom_range(0, 31)) | 5'($urandom_range(0, 31));
    for (int o = 0; o < 5; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        int pid;
        f = out_flit[o];
        if (got_idx[o] == 0) got_pid[o] = int'({f[48:45], f[36:29]});
        pid = got_pid[o];
        checks++;
        if (f !== mk_flit(pid, got_idx[o]) || o != xy_port(pkt_dst(pid))) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d pid %0d flit %0d: %h exp %h (port %0d)",
                                      o, pid, got_idx[o], f, mk_flit(pid, got_idx[o]), xy_port(pkt_dst(pid)));
        end
        got_idx[o] = (got_idx[o] == 4) ? 0 : got_idx[o] + 1;
        if (got_idx[o] == 0) n_done++;
      end
    end
  end

  initial begin
    int t_acc, t_out;
    out_ready = '1;
    for (int o = 0; o < 5; o++) got_idx[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Latency: one packet on the west input, alone.
    @(negedge clk);
    for (int k = 0; k < 5; k++) q[4].push_back(mk_flit(4 * NPKT + 0, k));
    t_acc = -1; t_out = -1;
    #1;
    // Sampled mid-cycle: the handshake cycle and the first cycle the flit
    // is offered at the output.
    for (int c = 0; c < 10 && t_out < 0; c++) begin
      if (in_valid[4] && in_ready[4] && t_acc < 0) t_acc = c;
      if (out_valid[xy_port(pkt_dst(4 * NPKT))] && t_out < 0) t_out = c;
      @(negedge clk);
    end
    checks++;
    if (t_out - t_acc != 2) begin
      failures++; $display("FAIL latency accepted %0d, out valid %0d", t_acc, t_out);
    end
    repeat (10) @(posedge clk);
    lat_mode = 0;
    @(negedge clk);
    for (int i = 0; i < 5; i++)
      for (int p = (i == 4 ? 1 : 0); p < NPKT; p++)
        for (int k = 0; k < 5; k++) q[i].push_back(mk_flit(i * NPKT + p, k));
    repeat (6000) begin
      @(posedge clk);
      if (n_done == 5 * NPKT) break;
    end
    checks++;
    if (n_done != 5 * NPKT) begin failures++; $display("FAIL %0d of %0d packets out", n_done, 5 * NPKT); end
    checks++;
    if (n_fired == 0 || n_corr == 0 || n_confl == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL mechanisms fired=%0d corrected=%0d conflicts=%0d stalls=%0d", n_fired, n_corr, n_confl, n_stall);
    end
    $display("router: packets=%0d trojan fired=%0d ecc corrected=%0d conflicts=%0d stalls=%0d",
             n_done, n_fired, n_corr, n_confl, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
