// router: five-port (local, north, east, south, west) wormhole router hardened
// against flit-field Trojans by bit shuffling.
//
// Path of a flit through one port pair:
//   link -> shuffle_encoder -> input flit_fifo -> hw_trojan -> crossbar ->
//   output flit_fifo -> shuffle_decoder -> link
// The encoder permutes the 14 critical bits (H, SRC, DST, QUAN, T) with a
// pattern keyed by the flit's own low payload byte and adds 5 Hamming parity
// bits, so everything inside the router, where a Trojan could sit, only sees
// shuffled fields. In parallel with the crossbar the address_extractor
// repairs and de-shuffles just the head/tail bits and destination of the flit
// at each input FIFO head, route_computation turns the destination into an
// output port and switch_arbiter allocates outputs packet by packet. The
// decoder at each output repairs a single-bit error and restores the fields.
//
// The Trojan (TROJAN, default the Head Hardware Trojan) sits behind every
// input buffer, where the published evaluation put it. SHUFFLE_EN = 0 gives
// the unprotected baseline router for comparison.
//
// Links use valid/ready: a flit moves when valid and ready are both high;
// in_ready is "input FIFO not full", out_valid is "output FIFO not empty".
// Uncontended, a flit accepted in cycle t is presented on an output in cycle
// t+2 (one cycle in each FIFO). Synchronous active-low reset. The valid/ready
// handshake, XY routing and the two-stage timing are this design's choices.
module router
  import noc_pkg::*;
#(
  parameter bit          SHUFFLE_EN = 1'b1,
  parameter trojan_e     TROJAN     = TR_HEAD,
  parameter logic [15:0] TRIG_VALUE = 16'hC35A,
  parameter int          FIFO_DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [COORD_W-1:0]        my_x,
  input  logic [COORD_W-1:0]        my_y,
  input  logic [N_PORTS-1:0]        in_valid,
  input  flit_t [N_PORTS-1:0]       in_flit,
  output logic [N_PORTS-1:0]        in_ready,
  output logic [N_PORTS-1:0]        out_valid,
  output flit_t [N_PORTS-1:0]       out_flit,
  input  logic [N_PORTS-1:0]        out_ready,
  output router_events_t            events
);
  iflit_t [N_PORTS-1:0]             enc_flit, buf_flit, trj_flit, xbar_flit, obuf_flit;
  logic   [N_PORTS-1:0]             in_full, in_empty, out_full, out_empty;
  logic   [N_PORTS-1:0]             head, tail, fired, dec_corr;
  logic   [N_PORTS-1:0][ADDR_W-1:0] dst;
  port_e  [N_PORTS-1:0]             rport;
  logic   [N_PORTS-1:0][PORT_BITS-1:0] rport_bits;
  logic   [N_PORTS-1:0]             in_pop, out_push, drop, conflict, stall;
  logic   [N_PORTS-1:0][PORT_BITS-1:0] out_sel;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    // ---- input side ----
    shuffle_encoder #(.SHUFFLE_EN(SHUFFLE_EN)) u_enc (.flit_i(in_flit[p]), .flit_o(enc_flit[p]));

    flit_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(IFLIT_W)) u_ififo (
      .clk, .rst_n,
      .wr_en(in_valid[p]), .wr_data(enc_flit[p]),
      .rd_en(in_pop[p]),   .rd_data(buf_flit[p]),
      .full(in_full[p]),   .empty(in_empty[p]));

    hw_trojan #(.KIND(TROJAN), .TRIG_VALUE(TRIG_VALUE)) u_trojan (
      .flit_i(buf_flit[p]), .flit_o(trj_flit[p]), .fired_o(fired[p]));

    address_extractor #(.SHUFFLE_EN(SHUFFLE_EN)) u_ext (
      .flit_i(trj_flit[p]), .head_o(head[p]), .tail_o(tail[p]), .dst_o(dst[p]),
      .corrected_o());

    route_computation u_rc (.my_x, .my_y, .dst_i(dst[p]), .port_o(rport[p]));
    assign rport_bits[p] = rport[p];

    assign in_ready[p] = !in_full[p];

    // ---- output side ----
    flit_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(IFLIT_W)) u_ofifo (
      .clk, .rst_n,
      .wr_en(out_push[p]),  .wr_data(xbar_flit[p]),
      .rd_en(out_ready[p]), .rd_data(obuf_flit[p]),
      .full(out_full[p]),   .empty(out_empty[p]));

    shuffle_decoder #(.SHUFFLE_EN(SHUFFLE_EN)) u_dec (
      .flit_i(obuf_flit[p]), .flit_o(out_flit[p]), .corrected_o(dec_corr[p]));

    assign out_valid[p] = !out_empty[p];
  end

  switch_arbiter #(.N_PORTS(N_PORTS)) u_arb (
    .clk, .rst_n,
    .in_valid(~in_empty), .in_head(head), .in_tail(tail), .in_port(rport_bits),
    .out_full, .in_pop, .out_push, .out_sel, .drop, .conflict, .stall);

  crossbar #(.N_PORTS(N_PORTS), .WIDTH(IFLIT_W)) u_xbar (
    .in_flit(trj_flit), .sel(out_sel), .out_flit(xbar_flit));

  assign events.trojan_fired  = fired & ~in_empty;
  assign events.ecc_corrected = dec_corr & out_valid & out_ready;
  assign events.dropped       = drop;
  assign events.arb_conflict  = conflict;
  assign events.stalled       = stall;
endmodule
