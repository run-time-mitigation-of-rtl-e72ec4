// noc_mesh: MESH_X x MESH_Y 2D mesh of Trojan-hardened wormhole routers (the
// evaluated network is 4 x 4). Router (x, y) sits at node index y*MESH_X + x
// and is wired to its four neighbours; links at the mesh edge are tied off
// (no valid in, always ready out). Every router carries the same Trojan, as a
// Trojan in the router design is present at every node, and the same shuffle
// mitigation. The local port of each router is brought out for the network
// interface of its node: inj_* into the mesh, ej_* out of it, all valid/ready.
// events gives each router's per-cycle event flags for performance counters.
// Coordinates are 2 bits each, so MESH_X and MESH_Y may be at most 4.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int          MESH_X     = 4,
  parameter int          MESH_Y     = 4,
  parameter bit          SHUFFLE_EN = 1'b1,
  parameter trojan_e     TROJAN     = TR_HEAD,
  parameter logic [15:0] TRIG_VALUE = 16'hC35A,
  parameter int          FIFO_DEPTH = 8,
  localparam int         N_NODES    = MESH_X * MESH_Y
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [N_NODES-1:0]           inj_valid,
  input  flit_t [N_NODES-1:0]           inj_flit,
  output logic  [N_NODES-1:0]           inj_ready,
  output logic  [N_NODES-1:0]           ej_valid,
  output flit_t [N_NODES-1:0]           ej_flit,
  input  logic  [N_NODES-1:0]           ej_ready,
  output router_events_t [N_NODES-1:0]  events
);
  // Per router, per port link signals.
  logic  [N_NODES-1:0][N_PORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  flit_t [N_NODES-1:0][N_PORTS-1:0] r_in_flit, r_out_flit;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      router #(.SHUFFLE_EN(SHUFFLE_EN), .TROJAN(TROJAN), .TRIG_VALUE(TRIG_VALUE),
               .FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk, .rst_n,
        .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .in_valid(r_in_valid[N]),   .in_flit(r_in_flit[N]),   .in_ready(r_in_ready[N]),
        .out_valid(r_out_valid[N]), .out_flit(r_out_flit[N]), .out_ready(r_out_ready[N]),
        .events(events[N]));

      // Local port.
      assign r_in_valid[N][PORT_L]  = inj_valid[N];
      assign r_in_flit[N][PORT_L]   = inj_flit[N];
      assign inj_ready[N]           = r_in_ready[N][PORT_L];
      assign ej_valid[N]            = r_out_valid[N][PORT_L];
      assign ej_flit[N]             = r_out_flit[N][PORT_L];
      assign r_out_ready[N][PORT_L] = ej_ready[N];

      // North neighbour (y-1): its south output feeds this north input.
      if (y > 0) begin : g_n
        assign r_in_valid[N][PORT_N]  = r_out_valid[N-MESH_X][PORT_S];
        assign r_in_flit[N][PORT_N]   = r_out_flit[N-MESH_X][PORT_S];
        assign r_out_ready[N][PORT_N] = r_in_ready[N-MESH_X][PORT_S];
      end else begin : g_n_edge
        assign r_in_valid[N][PORT_N]  = 1'b0;
        assign r_in_flit[N][PORT_N]   = '0;
        assign r_out_ready[N][PORT_N] = 1'b1;
      end
      // South neighbour (y+1).
      if (y < MESH_Y - 1) begin : g_s
        assign r_in_valid[N][PORT_S]  = r_out_valid[N+MESH_X][PORT_N];
        assign r_in_flit[N][PORT_S]   = r_out_flit[N+MESH_X][PORT_N];
        assign r_out_ready[N][PORT_S] = r_in_ready[N+MESH_X][PORT_N];
      end else begin : g_s_edge
        assign r_in_valid[N][PORT_S]  = 1'b0;
        assign r_in_flit[N][PORT_S]   = '0;
        assign r_out_ready[N][PORT_S] = 1'b1;
      end
      // East neighbour (x+1).
      if (x < MESH_X - 1) begin : g_e
        assign r_in_valid[N][PORT_E]  = r_out_valid[N+1][PORT_W];
        assign r_in_flit[N][PORT_E]   = r_out_flit[N+1][PORT_W];
        assign r_out_ready[N][PORT_E] = r_in_ready[N+1][PORT_W];
      end else begin : g_e_edge
        assign r_in_valid[N][PORT_E]  = 1'b0;
        assign r_in_flit[N][PORT_E]   = '0;
        assign r_out_ready[N][PORT_E] = 1'b1;
      end
      // West neighbour (x-1).
      if (x > 0) begin : g_w
        assign r_in_valid[N][PORT_W]  = r_out_valid[N-1][PORT_E];
        assign r_in_flit[N][PORT_W]   = r_out_flit[N-1][PORT_E];
        assign r_out_ready[N][PORT_W] = r_in_ready[N-1][PORT_E];
      end else begin : g_w_edge
        assign r_in_valid[N][PORT_W]  = 1'b0;
        assign r_in_flit[N][PORT_W]   = '0;
        assign r_out_ready[N][PORT_W] = 1'b1;
      end
    end
  end
endmodule
