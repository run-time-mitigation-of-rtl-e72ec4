// switch_arbiter: wormhole switch allocation for one router, the "arbiter" and
// the two FIFO controllers' control side of the router diagram.
//
// Per input i the arbiter sees whether its FIFO holds a flit, that flit's head
// and tail bits and the output port computed from its destination. An input
// is either idle or has a packet open on an output it holds:
//  * idle, head flit at the front: requests the computed port;
//  * open: requests the port it holds, whatever the flit (a head arriving
//    inside an open packet follows it; that is how a lost tail mixes packets);
//  * idle, flit at the front is not a head: the flit has no route and is
//    dropped (popped and discarded), as happens to a packet whose head bit a
//    Trojan cleared.
// Per output o a free output grants one requesting head round robin, starting
// after the last input granted; a held output only serves its owner. A grant
// needs room in output FIFO o and moves one flit: it pops input FIFO i, pushes
// output FIFO o and sets the crossbar select. A head opens a packet (unless it
// is also a tail) and the tail closes it and frees the output.
// Round robin and the drop rule are this design's reading of the published
// router; decisions are combinational, state changes at the clock edge.
module switch_arbiter
#(
  parameter int N_PORTS = noc_pkg::N_PORTS
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [N_PORTS-1:0]                    in_valid,
  input  logic [N_PORTS-1:0]                    in_head,
  input  logic [N_PORTS-1:0]                    in_tail,
  input  logic [N_PORTS-1:0][$clog2(N_PORTS)-1:0] in_port,
  input  logic [N_PORTS-1:0]                    out_full,
  output logic [N_PORTS-1:0]                    in_pop,
  output logic [N_PORTS-1:0]                    out_push,
  output logic [N_PORTS-1:0][$clog2(N_PORTS)-1:0] out_sel,
  output logic [N_PORTS-1:0]                    drop,
  output logic [N_PORTS-1:0]                    conflict,
  output logic [N_PORTS-1:0]                    stall
);
  localparam int PW = $clog2(N_PORTS);

  logic [N_PORTS-1:0]         open_q;    // input has a packet open
  logic [N_PORTS-1:0][PW-1:0] route_q;   // output held by an open input
  logic [N_PORTS-1:0]         lock_q;    // output held by a packet
  logic [N_PORTS-1:0][PW-1:0] owner_q;   // input holding the output
  logic [N_PORTS-1:0][PW-1:0] rr_q;      // first input to consider next time

  logic [N_PORTS-1:0]         req;
  logic [N_PORTS-1:0][PW-1:0] req_port;
  logic [N_PORTS-1:0]         grant_in;  // input i granted
  logic [N_PORTS-1:0][PW-1:0] grant_out; // output granted to input i

  function automatic logic [PW-1:0] wrap(int v);
    return PW'(v % N_PORTS);
  endfunction

  int            ncand;
  logic          found;
  logic [PW-1:0] winner, cand;

  always_comb begin
    ncand  = 0;
    found  = 1'b0;
    winner = '0;
    cand   = '0;
    for (int i = 0; i < N_PORTS; i++) begin
      req_port[i] = open_q[i] ? route_q[i] : in_port[i];
      req[i]      = in_valid[i] && (open_q[i] || in_head[i]);
      drop[i]     = in_valid[i] && !open_q[i] && !in_head[i];
    end

    grant_in  = '0;
    grant_out = '0;
    out_push  = '0;
    out_sel   = '0;
    conflict  = '0;
    stall     = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      ncand  = 0;
      found  = 1'b0;
      winner = '0;
      if (lock_q[o]) begin
        if (req[owner_q[o]] && open_q[owner_q[o]] && req_port[owner_q[o]] == PW'(o)) begin
          found  = 1'b1;
          winner = owner_q[o];
        end
      end else begin
        for (int k = 0; k < N_PORTS; k++) begin
          cand = wrap(int'(rr_q[o]) + k);
          if (req[cand] && !open_q[cand] && req_port[cand] == PW'(o)) begin
            ncand++;
            if (!found) begin
              found  = 1'b1;
              winner = cand;
            end
          end
        end
      end
      conflict[o] = (ncand > 1);
      if (found) begin
        if (out_full[o]) begin
          stall[o] = 1'b1;
        end else begin
          out_push[o]       = 1'b1;
          out_sel[o]        = winner;
          grant_in[winner]  = 1'b1;
          grant_out[winner] = PW'(o);
        end
      end
    end

    in_pop = grant_in | drop;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      open_q  <= '0;
      route_q <= '0;
      lock_q  <= '0;
      owner_q <= '0;
      rr_q    <= '0;
    end else begin
      for (int i = 0; i < N_PORTS; i++) begin
        if (grant_in[i]) begin
          if (!open_q[i]) begin
            rr_q[grant_out[i]] <= wrap(i + 1);
            if (!in_tail[i]) begin
              open_q[i]             <= 1'b1;
              route_q[i]            <= grant_out[i];
              lock_q[grant_out[i]]  <= 1'b1;
              owner_q[grant_out[i]] <= PW'(i);
            end
          end else if (in_tail[i]) begin
            open_q[i]            <= 1'b0;
            lock_q[grant_out[i]] <= 1'b0;
          end
        end
      end
    end
  end

`ifndef SYNTHESIS
  // A pushed output FIFO is never full, and an input is never both granted
  // and dropped.
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) (out_push & out_full) == '0);
  a_grant_xor_drop: assert property (@(posedge clk) disable iff (!rst_n) (grant_in & drop) == '0);
`endif
endmodule
