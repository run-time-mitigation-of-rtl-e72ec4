// noc_pkg: types, field positions and shared functions of the Trojan-hardened
// wormhole mesh NoC.
//
// Link flit (50 bits, MSB first): H | SEQ(4) | SRC(4) | DST(4) | PAYLOAD(32) | QUAN(4) | T.
// Body and tail flits use everything between H and T as data; only the head flit
// gives the middle fields their meaning. The field order, the 32-bit payload and
// the 4-bit SRC/DST/QUAN for a 4x4 mesh follow the published flit format; the
// 4-bit SEQ width is this design's choice.
//
// Inside a router a flit carries 5 more bits on top (55 bits): the parity of a
// [19,14] Hamming code over the 14 "critical" bits H, SRC, DST, QUAN, T after
// they have been shuffled. The critical vector is indexed
//   0 = T, 4..1 = QUAN[3:0], 8..5 = DST[3:0], 12..9 = SRC[3:0], 13 = H.
// The shuffle select is derived from flit bits [12:5], the low 8 payload bits,
// which are never shuffled. The 8 permutations and the select derivation are
// this design's own (the scheme only fixes 3 select bits, 8 patterns, 14 bits).
package noc_pkg;

  localparam int FLIT_W    = 50;
  localparam int PAR_W     = 5;
  localparam int IFLIT_W   = FLIT_W + PAR_W;
  localparam int CRIT_W    = 14;
  localparam int SEL_W     = 3;
  localparam int N_PATTERNS = 1 << SEL_W;
  localparam int SEQ_W     = 4;
  localparam int ADDR_W    = 4;   // {x[1:0], y[1:0]}
  localparam int COORD_W   = 2;
  localparam int QUAN_W    = 4;
  localparam int PAYLOAD_W = 32;
  localparam int N_PORTS   = 5;
  localparam int PORT_BITS = 3;

  // Bit positions inside the link flit.
  localparam int POS_T      = 0;
  localparam int POS_QUAN   = 1;   // [4:1]
  localparam int POS_PAY    = 5;   // [36:5]
  localparam int POS_DST    = 37;  // [40:37]
  localparam int POS_SRC    = 41;  // [44:41]
  localparam int POS_SEQ    = 45;  // [48:45]
  localparam int POS_H      = 49;
  localparam int POS_SELDAT = 5;   // [12:5] feed the shuffle pattern selector
  localparam int POS_TRIG   = 13;  // [28:13] watched by the Trojan trigger

  typedef logic [FLIT_W-1:0]  flit_t;
  typedef logic [IFLIT_W-1:0] iflit_t;
  typedef logic [CRIT_W-1:0]  crit_t;
  typedef logic [PAR_W-1:0]   parity_t;
  typedef logic [SEL_W-1:0]   sel_t;

  typedef struct packed {
    logic                 h;
    logic [SEQ_W-1:0]     seq;
    logic [ADDR_W-1:0]    src;
    logic [ADDR_W-1:0]    dst;
    logic [PAYLOAD_W-1:0] payload;
    logic [QUAN_W-1:0]    quan;
    logic                 t;
  } head_flit_t;

  typedef enum logic [PORT_BITS-1:0] {
    PORT_L = 3'd0, PORT_N = 3'd1, PORT_E = 3'd2, PORT_S = 3'd3, PORT_W = 3'd4
  } port_e;

  typedef enum logic [2:0] {
    TR_NONE = 3'd0,   // Trojan-free router
    TR_QUAN = 3'd1,   // Quan Trojan (QT)
    TR_ADDR = 3'd2,   // Address Trojan (AT)
    TR_HEAD = 3'd3,   // Head Hardware Trojan (HHT)
    TR_TAIL = 3'd4    // Tail Hardware Trojan (THT)
  } trojan_e;

  // Per-cycle event flags a router reports (for performance counters).
  typedef struct packed {
    logic [N_PORTS-1:0] trojan_fired;   // Trojan trigger active on a flit leaving an input FIFO
    logic [N_PORTS-1:0] ecc_corrected;  // output decoder repaired a flit that left the router
    logic [N_PORTS-1:0] dropped;        // flit discarded: not a head and no packet open
    logic [N_PORTS-1:0] arb_conflict;   // several heads competed for this free output
    logic [N_PORTS-1:0] stalled;        // granted input waited for a full output FIFO
  } router_events_t;

  // Gather the critical bits of a flit into crit_t order.
  function automatic crit_t get_crit(flit_t f);
    crit_t c;
    c[0]    = f[POS_T];
    c[4:1]  = f[POS_QUAN +: QUAN_W];
    c[8:5]  = f[POS_DST +: ADDR_W];
    c[12:9] = f[POS_SRC +: ADDR_W];
    c[13]   = f[POS_H];
    return c;
  endfunction

  // Scatter a critical vector back into the critical positions of a flit.
  function automatic flit_t put_crit(flit_t f, crit_t c);
    flit_t r = f;
    r[POS_T]              = c[0];
    r[POS_QUAN +: QUAN_W] = c[4:1];
    r[POS_DST +: ADDR_W]  = c[8:5];
    r[POS_SRC +: ADDR_W]  = c[12:9];
    r[POS_H]              = c[13];
    return r;
  endfunction

  // Shuffle pattern p places input bit PERM_SRC[p][j] at output position j,
  // with PERM_SRC[p][j] = (A_p * j + B_p) mod 14. Every A_p is coprime to 14
  // and every pattern moves every bit.
  // (A_p, B_p) = (1,5) (3,1) (5,3) (9,7) (11,9) (13,11) (1,9) (3,13).

  localparam int PERM_SRC [N_PATTERNS][CRIT_W] = '{
    '{5, 6, 7, 8, 9, 10, 11, 12, 13, 0, 1, 2, 3, 4},
    '{1, 4, 7, 10, 13, 2, 5, 8, 11, 0, 3, 6, 9, 12},
    '{3, 8, 13, 4, 9, 0, 5, 10, 1, 6, 11, 2, 7, 12},
    '{7, 2, 11, 6, 1, 10, 5, 0, 9, 4, 13, 8, 3, 12},
    '{9, 6, 3, 0, 11, 8, 5, 2, 13, 10, 7, 4, 1, 12},
    '{11, 10, 9, 8, 7, 6, 5, 4, 3, 2, 1, 0, 13, 12},
    '{9, 10, 11, 12, 13, 0, 1, 2, 3, 4, 5, 6, 7, 8},
    '{13, 2, 5, 8, 11, 0, 3, 6, 9, 12, 1, 4, 7, 10}
  };

  // Hamming [19,14]: codeword position of data bit i. Positions run 1..19 and
  // the powers of two (1, 2, 4, 8, 16) hold the parity bits.
  localparam int HAM_POS [CRIT_W] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};

endpackage
