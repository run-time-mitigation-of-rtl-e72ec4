// tb_noc_mesh_full: the mesh exactly as built by default (4x4, Head Trojan in
// every router, bit shuffling on, 8-flit FIFOs) under uniform random traffic
// at 0.3 flits/cycle/node for 5000 cycles, with one packet in ten carrying
// the Trojan trigger. Every packet must be delivered bit-exact at its
// destination although the Trojan fires.
module tb_noc_mesh_full;
  import noc_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, inject_en = 0;
  int   fir_pm = 300, trig_pm = 100, bp_pm = 50;
  int   checks = 0, failures = 0;
  logic  [N-1:0] iv, ir, ev, er;
  flit_t [N-1:0] iflit, eflit;
  router_events_t [N-1:0] evt;
  int sent, trig, recv, del, mis, exact;
  longint lat;
  int node [N];
  logic [7:0] sel;
  logic idle;
  longint n_fired = 0, n_corr = 0;

  always #5 clk = ~clk;

  noc_mesh dut (.clk, .rst_n, .inj_valid(iv), .inj_flit(iflit), .inj_ready(ir),
                .ej_valid(ev), .ej_flit(eflit), .ej_ready(er), .events(evt));

  noc_traffic u_traffic (.clk, .rst_n, .inject_en, .fir_pm, .trig_pm, .bp_pm,
                         .inj_valid(iv), .inj_flit(iflit), .inj_ready(ir),
                         .ej_valid(ev), .ej_flit(eflit), .ej_ready(er),
                         .sent, .trig_sent(trig), .received(recv), .delivered(del),
                         .misrouted(mis), .exact, .latency_sum(lat), .recv_node(node),
                         .sel_seen(sel), .idle);

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N; n++) begin
      n_fired += $countones(evt[n].trojan_fired);
      n_corr  += $countones(evt[n].ecc_corrected);
    end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    inject_en = 1;
    repeat (5000) @(posedge clk);
    inject_en = 0;
    repeat (20000) begin
      @(posedge clk);
      if (idle && del == sent) break;
    end
    $display("sent=%0d triggered=%0d delivered=%0d exact=%0d misrouted=%0d avg latency=%0.1f fired=%0d corrected=%0d",
             sent, trig, del, exact, mis, (del > 0) ? real'(lat) / del : 0.0, n_fired, n_corr);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (node[n] == 0) begin failures++; $display("FAIL node %0d received nothing", n); end
    end
    checks++; if (sent < 1000)   begin failures++; $display("FAIL too little traffic"); end
    checks++; if (del != sent)   begin failures++; $display("FAIL delivered %0d of %0d", del, sent); end
    checks++; if (exact != del)  begin failures++; $display("FAIL corrupted packets"); end
    checks++; if (mis != 0)      begin failures++; $display("FAIL misrouted packets"); end
    checks++; if (n_fired == 0 || n_corr == 0) begin failures++; $display("FAIL Trojan never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
