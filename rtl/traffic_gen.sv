// traffic_gen: traffic generator of one node (packet source, source queue,
// flit generator).
//
// The packet source (see packet_source) pushes 28-bit injection timestamps
// into the source queue. Only timestamps are stored; the destination and the
// length of a packet are decided when the flit generator takes the timestamp
// out of the queue. Destinations are uniform random over the mesh, drawn from
// a second xorshift128+ generator. A packet is PKT_LEN flits: a head flit that
// carries the destination {y, x}, body flits, a last body flit (type 2'b11)
// with the upper timestamp half and a tail flit with the lower half. The flit
// generator picks, at the start of a packet, a VC of the router's local input
// port that has a credit, trying first the VC after the one the previous
// packet used (round robin), so that the next head can be routed while the
// previous packet is still leaving. It sends at most one flit per
// network cycle, and only when that VC has a credit.
//
// TDM form: the registers come in as st_i and leave as st_o. The source queue
// is a memory of N_CL x SQ_DEPTH timestamps, SQ_DEPTH per logical cluster. It
// is read on the falling edge and written on the rising edge. A full step
// (state_update) runs the packet source and the flit generator. A stall step
// (ps_step), used while the network is stalled, runs only the packet source.
// The flit sent this cycle appears in st_o.link; in_cred are the router's
// credits for its local input from the previous network cycle, and a credit
// may be spent in the cycle it arrives.
// The VC choice, the destination draw and the same-cycle use of a returned
// credit are this design's.
//
// Lint note: the destination uses only rnd[63:32], the stronger upper half of
// the xorshift+ output, so rnd[31:0] is unused.
module traffic_gen #(
  parameter int N_CL   = 4096,
  parameter int MESH_X = 128,
  parameter int MESH_Y = 128
) (
  input  logic                                   clk,
  input  logic                                   state_update,
  input  logic                                   ps_step,
  input  logic [$clog2(N_CL > 1 ? N_CL : 2)-1:0] cluster,
  input  logic [noc_pkg::COORD_W-1:0]            my_x,
  input  logic [noc_pkg::COORD_W-1:0]            my_y,
  input  logic [noc_pkg::TS_W-1:0]               net_time,
  input  logic [31:0]                            threshold,
  input  logic [noc_pkg::NUM_VC-1:0]             in_cred,
  input  noc_pkg::tgen_state_t                   st_i,
  output noc_pkg::tgen_state_t                   st_o,
  output logic                                   gen,      // a packet was created
  output logic [noc_pkg::TS_W-1:0]               gen_ts    // its timestamp
);
  import noc_pkg::*;
  localparam int CL_W = $clog2(N_CL > 1 ? N_CL : 2);
  localparam int AW   = CL_W + SQ_PTR_W;

  // ---------------- source queue ----------------
  logic [TS_W-1:0] q_head;
  logic [TS_W-1:0] q_mem [N_CL*SQ_DEPTH];
  logic            push;
  logic [TS_W-1:0] push_ts;

  always_ff @(negedge clk)
    q_head <= q_mem[AW'({cluster, st_i.q_rd})];
  always_ff @(posedge clk)
    if ((state_update || ps_step) && push)
      q_mem[AW'({cluster, st_i.q_wr})] <= push_ts;

  // ---------------- packet source ----------------
  psrc_state_t ps_n;
  packet_source u_ps (
    .step(state_update || ps_step), .net_time(net_time), .threshold(threshold),
    .q_full(st_i.q_cnt == SQ_CNT_W'(SQ_DEPTH)), .st_i(st_i.ps), .st_o(ps_n),
    .push(push), .push_ts(push_ts));

  assign gen    = (state_update || ps_step) && push;
  assign gen_ts = push_ts;

  // ---------------- flit generator ----------------
  logic [63:0] n0, n1, rnd;
  logic [COORD_W-1:0] dx, dy;
  port_e la_route;

  xorshift128p u_rng (.s0_i(st_i.d0), .s1_i(st_i.d1), .s0_o(n0), .s1_o(n1), .rnd_o(rnd));

  // uniform destination: scale 16 random bits to the mesh size
  assign dx = COORD_W'((32'(rnd[47:32]) * 32'(MESH_X)) >> 16);
  assign dy = COORD_W'((32'(rnd[63:48]) * 32'(MESH_Y)) >> 16);

  route_xy u_la (.cur_x(my_x), .cur_y(my_y), .dest(make_addr(dx, dy)), .port(la_route));

  logic             pop, vc_ok;
  logic [VCI_W-1:0] vc_pick;

  always_comb begin
    vc_ok   = 1'b0;
    vc_pick = '0;
    // round robin: start with the VC after the one the last packet used
    for (int k = NUM_VC - 1; k >= 0; k--) begin
      automatic int v = (int'(st_i.vc) + 1 + k) % NUM_VC;
      if (st_i.cred[v] != '0 || in_cred[v]) begin
        vc_ok   = 1'b1;
        vc_pick = VCI_W'(v);
      end
    end
  end

  always_comb begin
    st_o    = st_i;
    st_o.ps = ps_n;
    pop     = 1'b0;
    if (state_update) begin
      st_o.link = '0;
      for (int v = 0; v < NUM_VC; v++)
        st_o.cred[v] = st_i.cred[v] + CNT_W'(in_cred[v]);
      if (!st_i.active) begin
        if (st_i.q_cnt != '0 && vc_ok) begin
          pop          = 1'b1;
          st_o.d0      = n0;
          st_o.d1      = n1;
          st_o.ts      = q_head;
          st_o.vc      = vc_pick;
          st_o.active  = 1'b1;
          st_o.idx     = PKT_IDX_W'(1);
          st_o.link    = make_flit(FT_HEAD, VC_W'(vc_pick), PORT_W'(la_route), make_addr(dx, dy));
          st_o.cred[vc_pick] = st_o.cred[vc_pick] - 1'b1;
        end
      end else if (st_i.cred[st_i.vc] != '0 || in_cred[st_i.vc]) begin
        st_o.cred[st_i.vc] = st_o.cred[st_i.vc] - 1'b1;
        st_o.idx = st_i.idx + 1'b1;
        if (st_i.idx == PKT_IDX_W'(PKT_LEN - 1)) begin
          st_o.link   = make_flit(FT_TAIL, VC_W'(st_i.vc), '0, st_i.ts[DATA_W-1:0]);
          st_o.active = 1'b0;
        end else if (st_i.idx == PKT_IDX_W'(PKT_LEN - 2))
          st_o.link   = make_flit(FT_BTS, VC_W'(st_i.vc), '0, st_i.ts[TS_W-1:DATA_W]);
        else
          st_o.link   = make_flit(FT_BODY, VC_W'(st_i.vc), '0, '0);
      end
    end
    if (pop)  st_o.q_rd = st_i.q_rd + 1'b1;
    if (gen)  st_o.q_wr = st_i.q_wr + 1'b1;
    st_o.q_cnt = st_i.q_cnt + SQ_CNT_W'(gen) - SQ_CNT_W'(pop);
  end
endmodule
