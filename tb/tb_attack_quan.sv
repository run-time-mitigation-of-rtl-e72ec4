// tb_attack_quan: evaluation sweep for the Quan Trojan (QT). Two 4x4 meshes with
// this Trojan in every router, one protected by bit shuffling and one not,
// receive identical uniform random traffic (5-flit packets, one packet in five
// carrying the trigger). The flit injection rate is swept from 0.1 to 0.7
// flits/cycle/node in steps of 0.1; each point injects for INJECT_CYCLES and
// then drains. Per point it prints delivered packets, misrouted packets,
// throughput (delivered flits per node per injection cycle), average latency, and at 0.3 the packets received at
// each node. Checks at every point:
//  * unprotected: packets are lost (flit count and QUAN disagree);
//  * protected: some packets still arrive. Every hit is a 2-bit error that
//    the 1-bit code miscorrects into a third critical bit, so delivery is
//    lower than without protection; it is reported, not bounded.
module tb_attack_quan;
  import noc_pkg::*;
  localparam int N = 16;
  localparam int INJECT_CYCLES = 2000;
  localparam int MAX_DRAIN     = 6000;

  logic clk = 0, rst_n = 0, inject_en = 0;
  int   fir_pm = 100, trig_pm = 200, bp_pm = 0;
  int   checks = 0, failures = 0;

  logic  [N-1:0] p_iv, p_ir, p_ev, p_er, b_iv, b_ir, b_ev, b_er;
  flit_t [N-1:0] p_if, p_ef, b_if, b_ef;
  router_events_t [N-1:0] p_evt, b_evt;
  int p_sent, p_trig, p_recv, p_del, p_mis, p_exact, b_sent, b_trig, b_recv, b_del, b_mis, b_exact;
  longint p_lat, b_lat;
  int p_node [N], b_node [N];
  logic [7:0] p_sel, b_sel;
  logic p_idle, b_idle;

  always #5 clk = ~clk;

  noc_mesh #(.TROJAN(TR_QUAN)) u_prot (
    .clk, .rst_n, .inj_valid(p_iv), .inj_flit(p_if), .inj_ready(p_ir),
    .ej_valid(p_ev), .ej_flit(p_ef), .ej_ready(p_er), .events(p_evt));
  noc_mesh #(.SHUFFLE_EN(1'b0), .TROJAN(TR_QUAN)) u_base (
    .clk, .rst_n, .inj_valid(b_iv), .inj_flit(b_if), .inj_ready(b_ir),
    .ej_valid(b_ev), .ej_flit(b_ef), .ej_ready(b_er), .events(b_evt));

  noc_traffic u_tp (.clk, .rst_n, .inject_en, .fir_pm, .trig_pm, .bp_pm,
    .inj_valid(p_iv), .inj_flit(p_if), .inj_ready(p_ir),
    .ej_valid(p_ev), .ej_flit(p_ef), .ej_ready(p_er),
    .sent(p_sent), .trig_sent(p_trig), .received(p_recv), .delivered(p_del),
    .misrouted(p_mis), .exact(p_exact), .latency_sum(p_lat), .recv_node(p_node),
    .sel_seen(p_sel), .idle(p_idle));
  noc_traffic u_tu (.clk, .rst_n, .inject_en, .fir_pm, .trig_pm, .bp_pm,
    .inj_valid(b_iv), .inj_flit(b_if), .inj_ready(b_ir),
    .ej_valid(b_ev), .ej_flit(b_ef), .ej_ready(b_er),
    .sent(b_sent), .trig_sent(b_trig), .received(b_recv), .delivered(b_del),
    .misrouted(b_mis), .exact(b_exact), .latency_sum(b_lat), .recv_node(b_node),
    .sel_seen(b_sel), .idle(b_idle));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL rate %0d/1000: %s", fir_pm, what); end
  endtask

  initial begin
    $display("Quan Trojan (QT): 20%% of packets trigger the Trojan");
    for (int step = 1; step <= 7; step++) begin
      int drain;
      fir_pm = 100 * step;
      rst_n = 0;
      repeat (4) @(posedge clk);
      rst_n = 1;
      @(posedge clk);
      inject_en = 1;
      repeat (INJECT_CYCLES) @(posedge clk);
      inject_en = 0;
      drain = 0;
      while (drain < MAX_DRAIN && !(p_idle && b_idle && p_del == p_sent)) begin
        @(posedge clk);
        drain++;
      end
      repeat (300) @(posedge clk);
      drain += 300;
      $display("rate 0.%0d: offered %0d packets | protected: delivered %0d (%0.1f%%) misrouted %0d thr %0.3f lat %0.1f | unprotected: delivered %0d (%0.1f%%) misrouted %0d thr %0.3f lat %0.1f",
               step, p_sent,
               p_del, 100.0 * p_del / p_sent, p_mis, 5.0 * p_del / (N * INJECT_CYCLES),
               (p_del > 0) ? real'(p_lat) / p_del : 0.0,
               b_del, 100.0 * b_del / b_sent, b_mis, 5.0 * b_del / (N * INJECT_CYCLES),
               (b_del > 0) ? real'(b_lat) / b_del : 0.0);
      if (step == 3) begin
        string sp, sb;
        sp = ""; sb = "";
        for (int n = 0; n < N; n++) begin
          sp = {sp, $sformatf(" %4d", p_node[n])};
          sb = {sb, $sformatf(" %4d", b_node[n])};
        end
        $display("  packets received per node 0..15, protected  :%s", sp);
        $display("  packets received per node 0..15, unprotected:%s", sb);
      end
      check(p_sent > 0 && p_sent == b_sent, "identical offered traffic");
      check(b_del < b_sent, "unprotected mesh loses packets");
      check(p_del > 0, "protected mesh delivers packets");
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
