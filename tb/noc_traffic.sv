// noc_traffic: behavioural stand-in for the network interfaces and cores of
// every node of a mesh, used only by the testbenches. It
//  * injects 5-flit packets (head, 3 body, tail) with uniformly random
//    destinations at a rate of fir_pm flits per 1000 cycles per node; a share
//    trig_pm/1000 of the packets carry the Trojan trigger value in the
//    trigger field of their head and tail flits;
//  * ejects flits, holding ej_ready low on bp_pm/1000 of the cycles;
//  * reassembles packets per node and scores each one: a packet is received
//    when a head is followed by a tail and the flit count equals the head's
//    QUAN field, delivered when it is received at its true destination,
//    misrouted when received elsewhere; the rest is lost.
// Flit layout used: head = H | SEQ=pid[3:0] | SRC | DST | payload | QUAN=5 | T;
// body/tail = 0 | src(4) | random(8) | pid(8) | trigger field(16) | random(8) |
// random(4) | T. The packet is identified at the sink from its tail flit,
// whose src and pid bits lie outside every field a Trojan targets.
// All randomness comes from one xorshift generator seeded by SEED whose draws
// do not depend on the network, so two instances with the same SEED offer
// exactly the same traffic to two networks.
module noc_traffic
  import noc_pkg::*;
#(
  parameter int          MESH_X     = 4,
  parameter int          MESH_Y     = 4,
  parameter logic [15:0] TRIG_VALUE = 16'hC35A,
  parameter int unsigned SEED       = 32'h1234_5678,
  localparam int         N          = MESH_X * MESH_Y
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inject_en,
  input  int               fir_pm,
  input  int               trig_pm,
  input  int               bp_pm,
  output logic  [N-1:0]    inj_valid,
  output flit_t [N-1:0]    inj_flit,
  input  logic  [N-1:0]    inj_ready,
  input  logic  [N-1:0]    ej_valid,
  input  flit_t [N-1:0]    ej_flit,
  output logic  [N-1:0]    ej_ready,
  output int               sent,
  output int               trig_sent,
  output int               received,
  output int               delivered,
  output int               misrouted,
  output int               exact,
  output longint           latency_sum,
  output int               recv_node [N],
  output logic  [7:0]      sel_seen,
  output logic             idle
);
  int unsigned rng;
  flit_t       srcq [N][$];
  int          pid_ctr [N];
  int          pkt_dst [int];
  longint      pkt_t0 [int];
  flit_t       pkt_flits [int][5];
  logic        pkt_done [int];
  // sink state
  logic        open_s [N];
  int          cnt_s [N];
  flit_t       buf_s [N][5];
  longint      cycle;

  function automatic int unsigned draw();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      rng = SEED;
      for (int n = 0; n < N; n++) begin
        srcq[n].delete();
        pid_ctr[n] = 0;
        open_s[n]  = 1'b0;
        cnt_s[n]   = 0;
        recv_node[n] = 0;
      end
      pkt_dst.delete(); pkt_t0.delete(); pkt_flits.delete(); pkt_done.delete();
      cycle = 0;
      sent = 0; trig_sent = 0; received = 0; delivered = 0; misrouted = 0; exact = 0;
      latency_sum = 0; sel_seen <= '0;
      inj_valid <= '0; inj_flit <= '0; ej_ready <= '0; idle <= 1'b1;
    end else begin
      cycle++;
      for (int n = 0; n < N; n++) begin
        // ---------------- sink: flit accepted at this edge ----------------
        if (ej_valid[n] && ej_ready[n]) begin
          flit_t f;
          f = ej_flit[n];
          if (f[POS_H]) begin
            open_s[n] = 1'b1;
            cnt_s[n]  = 0;
          end
          if (open_s[n]) begin
            if (cnt_s[n] < 5) buf_s[n][cnt_s[n]] = f;
            cnt_s[n]++;
            if (f[POS_T]) begin
              int key;
              open_s[n] = 1'b0;
              key = int'(f[48:45]) * 256 + int'(f[36:29]);
              if (cnt_s[n] == int'(buf_s[n][0][POS_QUAN +: QUAN_W]) && pkt_dst.exists(key)
                  && !pkt_done[key]) begin
                pkt_done[key] = 1'b1;
                received++;
                recv_node[n]++;
                if (pkt_dst[key] == n) begin
                  logic same;
                  same = 1'b1;
                  for (int k = 0; k < 5; k++) if (buf_s[n][k] != pkt_flits[key][k]) same = 1'b0;
                  delivered++;
                  latency_sum += cycle - pkt_t0[key];
                  if (same) exact++;
                end else begin
                  misrouted++;
                end
              end
            end
          end
        end
        ej_ready[n] <= (draw() % 1000) >= bp_pm;

        // ---------------- source ----------------
        if (inj_valid[n] && inj_ready[n]) void'(srcq[n].pop_front());
        begin
          int unsigned r_gen, r_dst, r_trig, r_a, r_b;
          r_gen = draw(); r_dst = draw(); r_trig = draw(); r_a = draw(); r_b = draw();
          if (inject_en && (r_gen % 5000) < fir_pm) begin
            int d, pid, key;
            logic trig;
            flit_t f;
            logic [15:0] tf;
            d = int'(r_dst % (N - 1));
            if (d >= n) d++;
            pid = pid_ctr[n] % 256;
            pid_ctr[n]++;
            key = n * 256 + pid;
            trig = (r_trig % 1000) < trig_pm;
            for (int k = 0; k < 5; k++) begin
              int unsigned r;
              r = r_a * 32'(2 * k + 1) + r_b;
              tf = r[31:16];
              if (tf == TRIG_VALUE) tf = ~tf;
              if (trig && (k == 0 || k == 4)) tf = TRIG_VALUE;
              if (k == 0) begin
                f = '0;
                f[POS_H]               = 1'b1;
                f[POS_SEQ +: SEQ_W]    = SEQ_W'(pid);
                f[POS_SRC +: ADDR_W]   = {COORD_W'(n % MESH_X), COORD_W'(n / MESH_X)};
                f[POS_DST +: ADDR_W]   = {COORD_W'(d % MESH_X), COORD_W'(d / MESH_X)};
                f[36:29]               = 8'(pid);
                f[POS_TRIG +: 16]      = tf;
                f[POS_SELDAT +: 8]     = r[7:0];
                f[POS_QUAN +: QUAN_W]  = QUAN_W'(5);
                f[POS_T]               = 1'b0;
              end else begin
                f = '0;
                f[48:45]           = 4'(n);
                f[44:37]           = r[15:8];
                f[36:29]           = 8'(pid);
                f[POS_TRIG +: 16]  = tf;
                f[POS_SELDAT +: 8] = r[7:0];
                f[4:1]             = r[11:8];
                f[POS_T]           = (k == 4);
              end
              srcq[n].push_back(f);
              pkt_flits[key][k] = f;
              sel_seen[r[2:0] ^ r[5:3] ^ {1'b0, r[7:6]}] <= 1'b1;
            end
            pkt_dst[key]  = d;
            pkt_t0[key]   = cycle;
            pkt_done[key] = 1'b0;
            sent++;
            if (trig) trig_sent++;
          end
        end
        inj_valid[n] <= srcq[n].size() > 0;
        inj_flit[n]  <= (srcq[n].size() > 0) ? srcq[n][0] : '0;
      end
      begin
        logic any;
        any = 1'b0;
        for (int n = 0; n < N; n++) if (srcq[n].size() > 0) any = 1'b1;
        idle <= !any;
      end
    end
  end
endmodule
