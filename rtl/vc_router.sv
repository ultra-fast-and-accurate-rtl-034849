// vc_router: input-queued virtual-channel router in time-multiplexed form.
//
// Five ports (local, east, west, north, south), NUM_VC virtual channels per
// input port, VC_DEPTH-flit buffers, XY routing, credit-based flow control,
// separable output-first VC and switch allocators with fixed-priority arbiters
// and a 5x5 crossbar. The pipeline of a head flit is
//   RC (routing, while the flit is written into its buffer)
//   VA (output VC allocation)
//   SA (switch allocation, flit read from its buffer)
//   ST (switch traversal)
//   LT (link traversal),
// so a head flit that arrives at cycle t arrives at the next router at t+5.
// Body and tail flits inherit the route and the output VC and go straight to
// SA the cycle after they were buffered. With noc_pkg::LOOKAHEAD = 1 the route
// for this router arrives in the head flit (computed by the previous router)
// and VA is done in the arrival cycle: a 4-stage router, which computes the
// next router's route when the head flit leaves. The output VC is released
// when the tail flit wins the switch.
//
// Time-multiplexed form: the router holds no registers of its own. Its state
// (VC control, credit counters, pipeline registers) comes in as st_i and the
// next state leaves as st_o, so the caller can keep one state per logical node
// in a state memory. The flit buffers are memories enlarged to N_CL x VC_DEPTH
// entries per input VC, VC_DEPTH entries per logical cluster; they are read on
// the falling clock edge (the address comes from st_i, which changes on the
// rising edge) and written on the rising edge when state_update is high, so
// that a buffer's contents need not be saved in the state memory.
// Link inputs (in_flit, in_cred) are the neighbours' lt_reg / cred_out of the
// previous network cycle; this router's link outputs are st_o.lt_reg and
// st_o.cred_out. The pipeline follows the document; register placement, VC
// release at tail departure and the buffer read edge are this design's, as
// is the use of a credit in the cycle it arrives (a credit returned by the
// downstream router can win switch allocation at once, which keeps the credit
// loop of a 4-flit buffer from adding a bubble to a lone packet at the sink).
module vc_router #(
  parameter int N_CL = 4096                      // logical clusters sharing this router
) (
  input  logic                                  clk,
  input  logic                                  state_update,  // commit buffer writes
  input  logic [$clog2(N_CL > 1 ? N_CL : 2)-1:0] cluster,       // logical cluster emulated now
  input  logic [noc_pkg::COORD_W-1:0]           my_x,
  input  logic [noc_pkg::COORD_W-1:0]           my_y,
  input  noc_pkg::router_state_t                st_i,
  input  noc_pkg::flit_t [noc_pkg::NPORT-1:0]   in_flit,
  input  logic [noc_pkg::NPORT-1:0][noc_pkg::NUM_VC-1:0] in_cred,
  output noc_pkg::router_state_t                st_o
);
  import noc_pkg::*;
  localparam int CL_W = $clog2(N_CL > 1 ? N_CL : 2);
  localparam int NI   = NPORT * NUM_VC;
  localparam int AW   = CL_W + PTR_W;

  // ---------------- flit buffers ----------------
  flit_t [NPORT-1:0][NUM_VC-1:0] front;     // flit at the head of each buffer
  logic  [NPORT-1:0][NUM_VC-1:0] arr;       // a flit arrives for this VC

  for (genvar p = 0; p < NPORT; p++) begin : g_bp
    for (genvar v = 0; v < NUM_VC; v++) begin : g_bv
      flit_t mem [N_CL*VC_DEPTH];
      always_ff @(negedge clk)
        front[p][v] <= mem[AW'({cluster, st_i.ivc[p][v].rd})];
      always_ff @(posedge clk)
        if (state_update && arr[p][v]) begin
          mem[AW'({cluster, st_i.ivc[p][v].wr})] <= in_flit[p];
          assert (st_i.ivc[p][v].cnt < CNT_W'(VC_DEPTH))
            else $error("vc_router: flit arrived at a full VC buffer");
        end
    end
  end

  always_comb
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++)
        arr[p][v] = f_valid(in_flit[p]) && (int'(f_vc(in_flit[p])) == v);

  // ---------------- routing computation ----------------
  flit_t [NPORT-1:0][NUM_VC-1:0] rc_src;
  logic  [NPORT-1:0][NUM_VC-1:0] rc_ok;
  port_e [NPORT-1:0][NUM_VC-1:0] rc_xy;
  logic  [NPORT-1:0][NUM_VC-1:0][PORT_W-1:0] rc_port;

  for (genvar p = 0; p < NPORT; p++) begin : g_rp
    for (genvar v = 0; v < NUM_VC; v++) begin : g_rv
      route_xy u_rc (.cur_x(my_x), .cur_y(my_y), .dest(f_data(rc_src[p][v])), .port(rc_xy[p][v]));
    end
  end

  always_comb
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        rc_src[p][v]  = (st_i.ivc[p][v].cnt != '0) ? front[p][v] : in_flit[p];
        rc_ok[p][v]   = (st_i.ivc[p][v].st == VC_IDLE) &&
                        ((st_i.ivc[p][v].cnt != '0) || arr[p][v]) &&
                        (f_type(rc_src[p][v]) == FT_HEAD);
        rc_port[p][v] = LOOKAHEAD ? f_la(rc_src[p][v]) : PORT_W'(rc_xy[p][v]);
      end

  // ---------------- VC allocation ----------------
  logic [NI-1:0]              va_req, va_gnt;
  logic [NI-1:0][PORT_W-1:0]  va_port;
  logic [NI-1:0][VCI_W-1:0]   va_vc;

  always_comb
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        va_req[p*NUM_VC+v]  = (st_i.ivc[p][v].st == VC_WAIT_VA) || (LOOKAHEAD && rc_ok[p][v]);
        va_port[p*NUM_VC+v] = (st_i.ivc[p][v].st == VC_WAIT_VA) ? st_i.ivc[p][v].oport
                                                                 : rc_port[p][v];
      end

  vc_allocator #(.NP(NPORT), .NV(NUM_VC)) u_va (
    .req(va_req), .req_port(va_port), .ovc_free(~st_i.ovc_busy),
    .gnt(va_gnt), .gnt_vc(va_vc));

  // ---------------- switch allocation ----------------
  logic [NI-1:0]             sa_req, sa_gnt;
  logic [NI-1:0][PORT_W-1:0] sa_port;
  logic [NPORT-1:0]          xb_vld;
  logic [NPORT-1:0][NI-1:0]  xb_sel;

  always_comb
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        sa_port[p*NUM_VC+v] = st_i.ivc[p][v].oport;
        sa_req[p*NUM_VC+v]  = (st_i.ivc[p][v].st == VC_ACTIVE) && (st_i.ivc[p][v].cnt != '0) &&
                              ((st_i.cred[st_i.ivc[p][v].oport][st_i.ivc[p][v].ovc] != '0) ||
                               in_cred[st_i.ivc[p][v].oport][st_i.ivc[p][v].ovc]);
      end

  switch_allocator #(.NP(NPORT), .NV(NUM_VC)) u_sa (
    .req(sa_req), .req_port(sa_port), .gnt(sa_gnt), .out_vld(xb_vld), .out_sel(xb_sel));

  // ---------------- crossbar and look-ahead route ----------------
  flit_t [NPORT-1:0] xb_flit;
  logic  [NPORT-1:0][VCI_W-1:0] xb_vc;
  port_e [NPORT-1:0] la_next;
  logic  [NPORT-1:0][COORD_W-1:0] nx, ny;

  always_comb
    for (int o = 0; o < NPORT; o++) begin
      xb_flit[o] = '0;
      xb_vc[o]   = '0;
      for (int i = 0; i < NI; i++)
        if (xb_sel[o][i]) begin
          xb_flit[o] = front[i / NUM_VC][i % NUM_VC];
          xb_vc[o]   = st_i.ivc[i / NUM_VC][i % NUM_VC].ovc;
        end
      nx[o] = my_x;
      ny[o] = my_y;
      case (PORT_W'(o))
        P_EAST:  nx[o] = my_x + 1'b1;
        P_WEST:  nx[o] = my_x - 1'b1;
        P_SOUTH: ny[o] = my_y + 1'b1;
        P_NORTH: ny[o] = my_y - 1'b1;
        default: ;
      endcase
    end

  for (genvar o = 0; o < NPORT; o++) begin : g_la
    route_xy u_la (.cur_x(nx[o]), .cur_y(ny[o]), .dest(f_data(xb_flit[o])), .port(la_next[o]));
  end

  // ---------------- next state ----------------
  always_comb begin
    st_o = st_i;
    // pipeline registers after switch allocation
    for (int o = 0; o < NPORT; o++) begin
      st_o.sa_reg[o] = xb_vld[o] ? set_vc_la(xb_flit[o], VC_W'(xb_vc[o]), PORT_W'(la_next[o])) : '0;
      st_o.st_reg[o] = st_i.sa_reg[o];
      st_o.lt_reg[o] = st_i.st_reg[o];
    end
    // credits returned by downstream routers
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NUM_VC; v++)
        st_o.cred[o][v] = st_i.cred[o][v] + CNT_W'(in_cred[o][v]);
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        automatic int i = p * NUM_VC + v;
        st_o.cred_out[p][v] = 1'b0;
        // buffer write
        if (arr[p][v]) begin
          st_o.ivc[p][v].wr = st_i.ivc[p][v].wr + 1'b1;
        end
        // routing computation
        if (rc_ok[p][v]) begin
          st_o.ivc[p][v].st    = VC_WAIT_VA;
          st_o.ivc[p][v].oport = rc_port[p][v];
        end
        // VC allocation
        if (va_gnt[i]) begin
          st_o.ivc[p][v].st    = VC_ACTIVE;
          st_o.ivc[p][v].oport = va_port[i];
          st_o.ivc[p][v].ovc   = va_vc[i];
          st_o.ovc_busy[va_port[i]][va_vc[i]] = 1'b1;
        end
        // switch allocation: the flit leaves its buffer
        if (sa_gnt[i]) begin
          st_o.ivc[p][v].rd   = st_i.ivc[p][v].rd + 1'b1;
          st_o.cred_out[p][v] = 1'b1;
          st_o.cred[st_i.ivc[p][v].oport][st_i.ivc[p][v].ovc] =
            st_o.cred[st_i.ivc[p][v].oport][st_i.ivc[p][v].ovc] - 1'b1;
          if (f_type(front[p][v]) == FT_TAIL) begin
            st_o.ivc[p][v].st = VC_IDLE;
            st_o.ovc_busy[st_i.ivc[p][v].oport][st_i.ivc[p][v].ovc] = 1'b0;
          end
        end
        st_o.ivc[p][v].cnt = st_i.ivc[p][v].cnt + CNT_W'(arr[p][v]) - CNT_W'(sa_gnt[i]);
      end
  end

endmodule
