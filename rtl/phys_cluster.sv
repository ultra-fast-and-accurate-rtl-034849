// phys_cluster: the physical cluster - PHY_X x PHY_Y interconnected nodes
// that emulate one logical cluster (a PHY_X x PHY_Y tile of the mesh) at a
// time.
//
// Node (lx, ly) is index ly*PHY_X + lx and has global mesh coordinates
// (cx*PHY_X + lx, cy*PHY_Y + ly) for the logical cluster (cx, cy) being
// emulated. Links between nodes of the cluster are wired directly: a node
// reads its neighbour's link value of the current network cycle (cur_link),
// which is the value the neighbour produced in the previous one. Links that
// leave the tile are brought out per side: the in_* ports carry what the
// neighbouring logical cluster sent in the previous network cycle (from the
// out/in buffers), and the q_out_* ports carry this cluster's new values for
// the next cycle.
// Registers: on state_update (the first FPGA cycle of a logical cluster) the
// next state of all nodes is captured in ns_q and the outgoing boundary links
// in q_out_*. They are written to register W and to the out buffer in the
// second FPGA cycle. st_o (unregistered) is also given out so that the caller
// can update register R in place during network-stall cycles (ps_step).
//
// The cluster of interconnected physical nodes follows the document; the direct
// wiring of the inner links from the loaded state is this design's choice.
module phys_cluster #(
  parameter int N_CL   = 4096,
  parameter int MESH_X = 128,
  parameter int MESH_Y = 128,
  parameter int PHY_X  = 2,
  parameter int PHY_Y  = 2,
  localparam int NN    = PHY_X * PHY_Y,
  localparam int CL_W  = $clog2(N_CL > 1 ? N_CL : 2)
) (
  input  logic                              clk,
  input  logic                              state_update,
  input  logic                              ps_step,
  input  logic [CL_W-1:0]                   cluster,
  input  logic [noc_pkg::COORD_W-1:0]       base_x,     // cx * PHY_X
  input  logic [noc_pkg::COORD_W-1:0]       base_y,     // cy * PHY_Y
  input  logic [noc_pkg::TS_W-1:0]          net_time,
  input  logic [noc_pkg::TS_W-1:0]          end_time,
  input  logic [31:0]                       threshold,
  input  noc_pkg::node_state_t [NN-1:0]     st_i,
  input  noc_pkg::link_t [PHY_Y-1:0]        in_e,       // from the east neighbour cluster
  input  noc_pkg::link_t [PHY_Y-1:0]        in_w,
  input  noc_pkg::link_t [PHY_X-1:0]        in_n,
  input  noc_pkg::link_t [PHY_X-1:0]        in_s,
  output noc_pkg::node_state_t [NN-1:0]     st_o,
  output noc_pkg::node_state_t [NN-1:0]     ns_q,
  output noc_pkg::link_t [PHY_Y-1:0]        q_out_e,
  output noc_pkg::link_t [PHY_Y-1:0]        q_out_w,
  output noc_pkg::link_t [PHY_X-1:0]        q_out_n,
  output noc_pkg::link_t [PHY_X-1:0]        q_out_s,
  output noc_pkg::node_ev_t [NN-1:0]        ev,
  output logic                              stall_req
);
  import noc_pkg::*;

  link_t [NN-1:0][NPORT-1:1] in_link, cur_link, new_link;
  logic  [NN-1:0]            stall_n;

  for (genvar ly = 0; ly < PHY_Y; ly++) begin : g_y
    for (genvar lx = 0; lx < PHY_X; lx++) begin : g_x
      localparam int N = ly * PHY_X + lx;
      assign in_link[N][P_EAST]  = (lx < PHY_X - 1) ? cur_link[N+1][P_WEST]      : in_e[ly];
      assign in_link[N][P_WEST]  = (lx > 0)         ? cur_link[N-1][P_EAST]      : in_w[ly];
      assign in_link[N][P_NORTH] = (ly > 0)         ? cur_link[N-PHY_X][P_SOUTH] : in_n[lx];
      assign in_link[N][P_SOUTH] = (ly < PHY_Y - 1) ? cur_link[N+PHY_X][P_NORTH] : in_s[lx];

      emu_node #(.N_CL(N_CL), .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_node (
        .clk(clk), .state_update(state_update), .ps_step(ps_step), .cluster(cluster),
        .my_x(base_x + COORD_W'(lx)), .my_y(base_y + COORD_W'(ly)),
        .net_time(net_time), .end_time(end_time), .threshold(threshold),
        .st_i(st_i[N]), .in_link(in_link[N]), .st_o(st_o[N]),
        .cur_link(cur_link[N]), .new_link(new_link[N]), .ev(ev[N]), .stall_req(stall_n[N]));
    end
  end

  assign stall_req = |stall_n;

  always_ff @(posedge clk)
    if (state_update) begin
      ns_q <= st_o;
      for (int ly = 0; ly < PHY_Y; ly++) begin
        q_out_e[ly] <= new_link[ly*PHY_X + PHY_X - 1][P_EAST];
        q_out_w[ly] <= new_link[ly*PHY_X][P_WEST];
      end
      for (int lx = 0; lx < PHY_X; lx++) begin
        q_out_n[lx] <= new_link[lx][P_NORTH];
        q_out_s[lx] <= new_link[(PHY_Y-1)*PHY_X + lx][P_SOUTH];
      end
    end
endmodule
