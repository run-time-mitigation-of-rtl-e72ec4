// tb_noc_mesh: end-to-end run of the 4x4 mesh with uniform random traffic.
// Two networks receive exactly the same traffic: the protected mesh as built
// by default (Head Trojan in every router, bit shuffling on) and the same mesh
// without the shuffle protection. One packet in ten carries the Trojan
// trigger. Checks:
//  * protected mesh: every packet sent is delivered at its destination,
//    bit-exact, none misrouted;
//  * unprotected mesh: packets are lost (the attack is real);
//  * every mechanism happens: Trojan trigger, Hamming correction, all 8
//    shuffle patterns, arbitration conflict, output-FIFO stall, and (in the
//    unprotected mesh) the dropping of head-less flits.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int N = 16;
  localparam int INJECT_CYCLES = 3000;

  logic clk = 0, rst_n = 0, inject_en = 0;
  int   fir_pm = 300, trig_pm = 100, bp_pm = 100;
  int   checks = 0, failures = 0;

  // Protected mesh (all defaults) and unprotected mesh.
  logic  [N-1:0] a_iv, a_ir, a_ev, a_er, b_iv, b_ir, b_ev, b_er;
  flit_t [N-1:0] a_if, a_ef, b_if, b_ef;
  router_events_t [N-1:0] a_evt, b_evt;
  int a_sent, a_trig, a_recv, a_del, a_mis, a_exact, b_sent, b_trig, b_recv, b_del, b_mis, b_exact;
  longint a_lat, b_lat;
  int a_node [N], b_node [N];
  logic [7:0] a_sel, b_sel;
  logic a_idle, b_idle;
  longint n_fired = 0, n_corr = 0, n_confl = 0, n_stall = 0, n_drop_b = 0;

  always #5 clk = ~clk;

  noc_mesh u_prot (.clk, .rst_n, .inj_valid(a_iv), .inj_flit(a_if), .inj_ready(a_ir),
                   .ej_valid(a_ev), .ej_flit(a_ef), .ej_ready(a_er), .events(a_evt));
  noc_mesh #(.SHUFFLE_EN(1'b0)) u_base (
                   .clk, .rst_n, .inj_valid(b_iv), .inj_flit(b_if), .inj_ready(b_ir),
                   .ej_valid(b_ev), .ej_flit(b_ef), .ej_ready(b_er), .events(b_evt));

  noc_traffic u_ta (.clk, .rst_n, .inject_en, .fir_pm, .trig_pm, .bp_pm,
                    .inj_valid(a_iv), .inj_flit(a_if), .inj_ready(a_ir),
                    .ej_valid(a_ev), .ej_flit(a_ef), .ej_ready(a_er),
                    .sent(a_sent), .trig_sent(a_trig), .received(a_recv), .delivered(a_del),
                    .misrouted(a_mis), .exact(a_exact), .latency_sum(a_lat), .recv_node(a_node),
                    .sel_seen(a_sel), .idle(a_idle));
  noc_traffic u_tb (.clk, .rst_n, .inject_en, .fir_pm, .trig_pm, .bp_pm,
                    .inj_valid(b_iv), .inj_flit(b_if), .inj_ready(b_ir),
                    .ej_valid(b_ev), .ej_flit(b_ef), .ej_ready(b_er),
                    .sent(b_sent), .trig_sent(b_trig), .received(b_recv), .delivered(b_del),
                    .misrouted(b_mis), .exact(b_exact), .latency_sum(b_lat), .recv_node(b_node),
                    .sel_seen(b_sel), .idle(b_idle));

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N; n++) begin
      n_fired  += $countones(a_evt[n].trojan_fired);
      n_corr   += $countones(a_evt[n].ecc_corrected);
      n_confl  += $countones(a_evt[n].arb_conflict);
      n_stall  += $countones(a_evt[n].stalled);
      n_drop_b += $countones(b_evt[n].dropped);
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    inject_en = 1;
    repeat (INJECT_CYCLES) @(posedge clk);
    inject_en = 0;
    repeat (20000) begin
      @(posedge clk);
      if (a_idle && a_del == a_sent) break;
    end
    repeat (500) @(posedge clk);
    $display("protected  : sent=%0d triggered=%0d received=%0d delivered=%0d exact=%0d misrouted=%0d avg latency=%0.1f",
             a_sent, a_trig, a_recv, a_del, a_exact, a_mis, (a_del > 0) ? real'(a_lat) / a_del : 0.0);
    $display("unprotected: sent=%0d triggered=%0d received=%0d delivered=%0d exact=%0d misrouted=%0d avg latency=%0.1f",
             b_sent, b_trig, b_recv, b_del, b_exact, b_mis, (b_del > 0) ? real'(b_lat) / b_del : 0.0);
    $display("mechanisms : trojan fired=%0d ecc corrected=%0d conflicts=%0d stalls=%0d patterns=%b drops(unprotected)=%0d",
             n_fired, n_corr, n_confl, n_stall, a_sel, n_drop_b);
    check(a_sent > 500, "enough packets sent");
    check(a_sent == b_sent, "identical offered traffic");
    check(a_del == a_sent, "protected: all packets delivered");
    check(a_exact == a_del, "protected: all delivered packets bit-exact");
    check(a_mis == 0, "protected: no misrouting");
    check(b_del < b_sent, "unprotected: Trojan causes packet loss");
    check(n_fired > 0, "Trojan triggered");
    check(n_corr > 0, "Hamming correction used");
    check(a_sel == 8'hFF, "all 8 shuffle patterns used");
    check(n_confl > 0, "arbitration conflicts happened");
    check(n_stall > 0, "output FIFO stalls happened");
    check(n_drop_b > 0, "head-less flits dropped in the unprotected mesh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
