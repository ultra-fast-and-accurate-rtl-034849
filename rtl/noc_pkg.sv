// noc_pkg: types and constants shared by the time-multiplexed NoC emulator.
//
// The emulated node is an input-queued virtual-channel router with a traffic
// generator and a traffic sink. Everything a node remembers from one emulated
// network cycle to the next is collected in node_state_t, so that a single
// physical node can emulate many logical nodes by loading and storing this
// record (time-division multiplexing). Flits are plain bit vectors with the
// field layout valid | type | VC | look-ahead route | data (MSB first).
//
// Configuration that changes the width of the state record lives here:
// NUM_VC (1 or 2 in the evaluated designs) and LOOKAHEAD (0 = 5-stage router,
// 1 = 4-stage router with look-ahead routing). The defaults are the primary
// configuration: 2 VCs per port, 4-flit VCs, 8-flit packets, 8-entry source
// queues, 14-bit flit data (an 18-bit flit). Timestamps are 28 bits, carried in
// two 14-bit halves by the last body flit and the tail flit.
//
// The field list of a flit, its 18/21-bit size, the flit type codes and the
// configuration values follow the document; the bit order inside the data field,
// the state record layout and the seeding are this design's choices.
//
// Lint note: each flit field accessor reads only its own bits of the flit, so
// the linter reports the other bits of its argument as unused.
package noc_pkg;

  // ---------------- configuration ----------------
  parameter int NUM_VC    = 2;   // virtual channels per port
  parameter int VC_DEPTH  = 4;   // flits per VC buffer
  parameter int PKT_LEN   = 8;   // flits per packet (>= 3)
  parameter int SQ_DEPTH  = 8;   // source queue entries
  parameter bit LOOKAHEAD = 1'b0; // 1: 4-stage router with look-ahead routing

  // ---------------- derived widths ----------------
  parameter int NPORT    = 5;                      // local, east, west, north, south
  parameter int DATA_W   = 14;                     // flit data field (z)
  parameter int COORD_W  = 7;                      // per-dimension coordinate, mesh up to 128x128
  parameter int VC_W     = 1;                      // flit VC field (x); kept at 1 bit for 1 or 2 VCs
  parameter int LA_W     = LOOKAHEAD ? 3 : 0;      // look-ahead route field (y)
  parameter int FLIT_W   = 1 + 2 + VC_W + LA_W + DATA_W;
  parameter int TS_W     = 2 * DATA_W;             // injection timestamp / network time
  parameter int PTR_W    = $clog2(VC_DEPTH);
  parameter int CNT_W    = $clog2(VC_DEPTH + 1);
  parameter int SQ_PTR_W = $clog2(SQ_DEPTH);
  parameter int SQ_CNT_W = $clog2(SQ_DEPTH + 1);
  parameter int PKT_IDX_W = $clog2(PKT_LEN);
  parameter int PORT_W   = 3;
  parameter int VCI_W    = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // ---------------- ports ----------------
  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0, P_EAST = 3'd1, P_WEST = 3'd2, P_NORTH = 3'd3, P_SOUTH = 3'd4
  } port_e;

  // ---------------- flit type encoding ----------------
  parameter logic [1:0] FT_HEAD = 2'b10;
  parameter logic [1:0] FT_BODY = 2'b00;
  parameter logic [1:0] FT_BTS  = 2'b11;  // body flit carrying the upper timestamp half
  parameter logic [1:0] FT_TAIL = 2'b01;

  typedef logic [FLIT_W-1:0] flit_t;

  function automatic logic f_valid(flit_t f);
    return f[FLIT_W-1];
  endfunction
  function automatic logic [1:0] f_type(flit_t f);
    return f[FLIT_W-2 -: 2];
  endfunction
  function automatic logic [VC_W-1:0] f_vc(flit_t f);
    return f[FLIT_W-4 -: VC_W];
  endfunction
  function automatic logic [PORT_W-1:0] f_la(flit_t f);
    if (LOOKAHEAD) return f[DATA_W +: PORT_W];
    else           return '0;
  endfunction
  function automatic logic [DATA_W-1:0] f_data(flit_t f);
    return f[DATA_W-1:0];
  endfunction
  function automatic flit_t make_flit(logic [1:0] ty, logic [VC_W-1:0] vc,
                                      logic [PORT_W-1:0] la, logic [DATA_W-1:0] d);
    flit_t f;
    f = '0;
    f[FLIT_W-1]      = 1'b1;
    f[FLIT_W-2 -: 2] = ty;
    f[FLIT_W-4 -: VC_W] = vc;
    if (LOOKAHEAD) f[DATA_W +: PORT_W] = la;
    f[DATA_W-1:0]    = d;
    return f;
  endfunction
  function automatic flit_t set_vc_la(flit_t f, logic [VC_W-1:0] vc, logic [PORT_W-1:0] la);
    flit_t g;
    g = f;
    g[FLIT_W-4 -: VC_W] = vc;
    if (LOOKAHEAD) g[DATA_W +: PORT_W] = la;
    return g;
  endfunction

  // Destination address in the head flit data: {y, x}.
  function automatic logic [DATA_W-1:0] make_addr(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y);
    return {y, x};
  endfunction

  // ---------------- router state ----------------
  typedef enum logic [1:0] { VC_IDLE = 2'd0, VC_WAIT_VA = 2'd1, VC_ACTIVE = 2'd2 } vc_st_e;

  typedef struct packed {
    vc_st_e              st;     // idle / routed and waiting for VA / holding an output VC
    logic [PORT_W-1:0]   oport;  // output port of the packet at the front
    logic [VCI_W-1:0]    ovc;    // allocated output VC
    logic [PTR_W-1:0]    rd;     // buffer read pointer
    logic [PTR_W-1:0]    wr;     // buffer write pointer
    logic [CNT_W-1:0]    cnt;    // flits in the buffer
  } ivc_t;

  typedef struct packed {
    ivc_t  [NPORT-1:0][NUM_VC-1:0] ivc;       // input VC control
    logic  [NPORT-1:0][NUM_VC-1:0] ovc_busy;  // output VC held by a packet
    logic  [NPORT-1:0][NUM_VC-1:0][CNT_W-1:0] cred; // credits of downstream VC buffers
    flit_t [NPORT-1:0]             sa_reg;    // flit granted by switch allocation
    flit_t [NPORT-1:0]             st_reg;    // flit after switch traversal
    flit_t [NPORT-1:0]             lt_reg;    // flit on the output link
    logic  [NPORT-1:0][NUM_VC-1:0] cred_out;  // credit returned upstream, per input VC
  } router_state_t;

  // ---------------- traffic generator state ----------------
  typedef struct packed {
    logic [TS_W-1:0] time_cnt;  // packet source time counter
    logic [63:0]     s0, s1;    // xorshift128+ state of the injection process
    logic            pend;      // a generated packet waits for source queue space
  } psrc_state_t;

  typedef struct packed {
    psrc_state_t              ps;
    logic [SQ_PTR_W-1:0]      q_rd, q_wr;
    logic [SQ_CNT_W-1:0]      q_cnt;
    logic                     active;   // flit generator is sending a packet
    logic [PKT_IDX_W-1:0]     idx;      // next flit index of that packet
    logic [VCI_W-1:0]         vc;       // VC of that packet
    logic [TS_W-1:0]          ts;       // its injection timestamp
    logic [63:0]              d0, d1;   // xorshift128+ state for destinations
    logic [NUM_VC-1:0][CNT_W-1:0] cred; // credits of the router's local input VCs
    flit_t                    link;     // flit on the link to the router
  } tgen_state_t;

  // ---------------- traffic sink state ----------------
  typedef struct packed {
    logic [NUM_VC-1:0][DATA_W-1:0] ts_hi;    // upper timestamp half, per VC
    logic [NUM_VC-1:0]             cred_out; // credit returned to the router
  } sink_state_t;

  typedef struct packed {
    router_state_t r;
    tgen_state_t   g;
    sink_state_t   k;
  } node_state_t;

  // Data crossing one node-to-node link in one network cycle, in one direction:
  // the flit sent and the credits returned for flits received from that side.
  typedef struct packed {
    flit_t             flit;
    logic [NUM_VC-1:0] cred;
  } link_t;

  // Per-node statistics event of one network cycle.
  typedef struct packed {
    logic            gen;       // packet source generated a packet
    logic [TS_W-1:0] gen_ts;    // its timestamp
    logic            crossed;   // packet source time reached the end of measurement
    logic            rcv;       // traffic sink received a tail flit
    logic [TS_W-1:0] rcv_ts;    // injection timestamp of that packet
    logic [TS_W-1:0] rcv_lat;   // its latency
  } node_ev_t;

  // xorshift128+ step (S. Vigna): returns the new {s0, s1} and the output.
  function automatic logic [191:0] xs128p(logic [63:0] s0, logic [63:0] s1);
    logic [63:0] x, y, n1;
    x  = s0;
    y  = s1;
    x  = x ^ (x << 23);
    n1 = x ^ y ^ (x >> 17) ^ (y >> 26);
    return {y, n1, n1 + y};
  endfunction

  // Mixes a node number into a non-zero 64-bit seed (splitmix64 finaliser).
  function automatic logic [63:0] seed64(logic [63:0] v);
    logic [63:0] z;
    z = v + 64'h9E37_79B9_7F4A_7C15;
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    z = z ^ (z >> 31);
    return (z == 64'd0) ? 64'd1 : z;
  endfunction

  // Initial state of a logical node with global number id: empty buffers, all
  // credits available, timers at zero, generators seeded from the node number.
  function automatic node_state_t node_init(logic [31:0] id);
    node_state_t s;
    s = '0;
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NUM_VC; v++)
        s.r.cred[o][v] = CNT_W'(VC_DEPTH);
    for (int v = 0; v < NUM_VC; v++)
      s.g.cred[v] = CNT_W'(VC_DEPTH);
    s.g.ps.s0 = seed64({32'h0000_0001, id});
    s.g.ps.s1 = seed64({32'h0000_0002, id});
    s.g.d0    = seed64({32'h0000_0003, id});
    s.g.d1    = seed64({32'h0000_0004, id});
    return s;
  endfunction

endpackage
