// emu_node: one emulated network node - router, traffic generator and
// traffic sink - in time-multiplexed form.
//
// A node of a direct network (mesh) is a router whose local port connects to
// a traffic generator (injection) and a traffic sink (ejection). The node's
// complete register state is st_i (already replaced by the initial state by
// the caller while init_done is low); its next state is st_o. With
// state_update high the node emulates one network cycle. With ps_step high
// (network stalled) only the packet source advances and everything else keeps
// its value.
//
// Links: in_link[d] for d = east, west, north, south is what the neighbour in
// that direction sent during the previous network cycle (its flit and its
// returned credits). cur_link[d] is this node's outgoing link value for the
// current cycle, taken from st_i, for neighbours emulated at the same time.
// new_link[d] is the value for the next cycle, taken from st_o, for
// neighbours that read it later through the out/in buffers. Inside the node,
// the generator-router and router-sink links follow the same one-cycle rule.
// Statistic events (packet created, packet received, source time reached
// end_time) are reported for the caller to accumulate.
//
// The node structure (router plus generator plus sink) follows the document; the
// registered generator and sink links are this design's choice.
module emu_node #(
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
  input  logic [noc_pkg::TS_W-1:0]               end_time,
  input  logic [31:0]                            threshold,
  input  noc_pkg::node_state_t                   st_i,
  input  noc_pkg::link_t [noc_pkg::NPORT-1:1]    in_link,
  output noc_pkg::node_state_t                   st_o,
  output noc_pkg::link_t [noc_pkg::NPORT-1:1]    cur_link,
  output noc_pkg::link_t [noc_pkg::NPORT-1:1]    new_link,
  output noc_pkg::node_ev_t                      ev,
  output logic                                   stall_req   // source queue empty and source behind
);
  import noc_pkg::*;

  flit_t [NPORT-1:0]             r_in_flit;
  logic  [NPORT-1:0][NUM_VC-1:0] r_in_cred;
  router_state_t                 r_n;
  sink_state_t                   k_n;
  tgen_state_t                   g_n;
  logic                          rcv;
  logic [TS_W-1:0]               rcv_ts, rcv_lat;
  logic                          gen;
  logic [TS_W-1:0]               gen_ts;

  always_comb begin
    r_in_flit[P_LOCAL] = st_i.g.link;
    r_in_cred[P_LOCAL] = st_i.k.cred_out;
    for (int d = 1; d < NPORT; d++) begin
      r_in_flit[d] = in_link[d].flit;
      r_in_cred[d] = in_link[d].cred;
    end
  end

  vc_router #(.N_CL(N_CL)) u_router (
    .clk(clk), .state_update(state_update), .cluster(cluster), .my_x(my_x), .my_y(my_y),
    .st_i(st_i.r), .in_flit(r_in_flit), .in_cred(r_in_cred), .st_o(r_n));

  traffic_gen #(.N_CL(N_CL), .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_gen (
    .clk(clk), .state_update(state_update), .ps_step(ps_step), .cluster(cluster),
    .my_x(my_x), .my_y(my_y), .net_time(net_time), .threshold(threshold),
    .in_cred(st_i.r.cred_out[P_LOCAL]), .st_i(st_i.g), .st_o(g_n), .gen(gen), .gen_ts(gen_ts));

  traffic_sink u_sink (
    .state_update(state_update), .net_time(net_time), .in_flit(st_i.r.lt_reg[P_LOCAL]),
    .st_i(st_i.k), .st_o(k_n), .rcv(rcv), .rcv_ts(rcv_ts), .rcv_lat(rcv_lat));

  always_comb begin
    st_o.r = state_update ? r_n : st_i.r;
    st_o.g = g_n;
    st_o.k = k_n;
    for (int d = 1; d < NPORT; d++) begin
      cur_link[d].flit = st_i.r.lt_reg[d];
      cur_link[d].cred = st_i.r.cred_out[d];
      new_link[d].flit = st_o.r.lt_reg[d];
      new_link[d].cred = st_o.r.cred_out[d];
    end
    ev.gen     = gen;
    ev.gen_ts  = gen_ts;
    ev.crossed = (state_update || ps_step) && (g_n.ps.time_cnt == end_time) &&
                 (st_i.g.ps.time_cnt != end_time);
    ev.rcv     = rcv;
    ev.rcv_ts  = rcv_ts;
    ev.rcv_lat = rcv_lat;
  end

  assign stall_req = (st_i.g.q_cnt == '0) && (st_i.g.ps.time_cnt < net_time);

endmodule
