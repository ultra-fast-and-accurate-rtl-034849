// noc_emulator: cycle-accurate emulator of a large 2-D mesh network-on-chip
// built from a few physical router nodes by time-division multiplexing.
//
// The emulated network is a MESH_X x MESH_Y mesh of input-queued VC routers,
// each with a traffic generator and a traffic sink (128 x 128 = 16,384 nodes
// by default). A physical cluster of PHY_X x PHY_Y real nodes (2 x 2 by
// default) emulates the mesh one tile ("logical cluster") at a time; there are
// N = (MESH_X/PHY_X) * (MESH_Y/PHY_Y) logical clusters, 4096 by default.
// Datapath:
//   state_memory  - registers of every logical cluster, with registers R
//                   (state going in) and W (state coming out);
//   phys_cluster  - the real nodes; their flit buffers and source queues are
//                   memories with one region per logical cluster;
//   out_buffer    - every cluster's outgoing boundary links for the next
//                   network cycle;
//   in_buffer     - old east/south links kept for clusters emulated later;
//   tdm_controller- two FPGA cycles per logical cluster, network time,
//                   init_done and network stalls;
//   sim_controller- warm-up / measurement / drain, statistics, unstable
//                   detection and the automatic sweep over injection rates;
//   uart_tx       - sends each run's results to the host (RS232C, 0.5 Mbit/s).
// One network cycle costs 2*N FPGA cycles plus stall cycles. Links that
// leave the mesh carry nothing.
//
// Interface: after rst, a start pulse runs num_rates emulations with the
// packet injection threshold thr_first, thr_first+thr_step, ... (threshold =
// packets per node per cycle * 2^32). Each run's results appear with
// res_valid and are sent on uart_txd; all_done rises at the end.
// warmup/measure set the phase lengths in network cycles, lat_limit the
// average-latency limit of a stable run.
//
// The datapath (physical cluster, state memory, out and in buffers), the two-cycle
// timing, init_done, network stalls, auto-reset and the serial result link follow
// the document; the host-side ports and the result record are this design's.
//
// Lint note: w_q, the register W output of the state memory, is left open
// here; the state memory writes W back into itself and nothing else needs it.
module noc_emulator #(
  parameter int MESH_X = 128,
  parameter int MESH_Y = 128,
  parameter int PHY_X  = 2,
  parameter int PHY_Y  = 2,
  parameter int CLKS_PER_BIT = 200      // result link: 100 MHz / 0.5 Mbit/s
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [noc_pkg::TS_W-1:0] warmup,
  input  logic [noc_pkg::TS_W-1:0] measure,
  input  logic [31:0]              thr_first,
  input  logic [31:0]              thr_step,
  input  logic [7:0]               num_rates,
  input  logic [15:0]              lat_limit,
  output logic                     res_valid,
  output logic [7:0]               res_rate,
  output logic [31:0]              res_threshold,
  output logic [31:0]              res_packets,
  output logic [47:0]              res_latency,
  output logic [noc_pkg::TS_W-1:0] res_cycles,
  output logic [31:0]              res_stalls,
  output logic                     res_unstable,
  output logic                     led_unstable,
  output logic                     busy,
  output logic                     all_done,
  output logic                     uart_txd     // results to the host, RS232C 8N1
);
  import noc_pkg::*;
  localparam int CX    = MESH_X / PHY_X;
  localparam int CY    = MESH_Y / PHY_Y;
  localparam int N_CL  = CX * CY;
  localparam int NN    = PHY_X * PHY_Y;
  localparam int CL_W  = $clog2(N_CL > 1 ? N_CL : 2);

  // ---------------- control ----------------
  logic            emu_rst, emu_go, halt_req, running, phase2, state_update, ps_step;
  logic            init_done, cycle_end, emu_done, stall_req;
  logic [TS_W-1:0] net_time, end_time;
  logic [31:0]     stall_cycles, threshold;
  logic [CL_W-1:0] cl, cl_next, cl_prev, cl_e, cl_w, cl_n, cl_s;
  logic            has_e, has_w, has_n, has_s;
  logic [15:0]     cx, cy;

  tdm_controller #(.CX(CX), .CY(CY)) u_tdm (
    .clk(clk), .rst(rst || emu_rst), .go(emu_go), .halt_req(halt_req), .stall_req(stall_req),
    .running(running), .phase2(phase2), .state_update(state_update), .ps_step(ps_step),
    .init_done(init_done), .cycle_end(cycle_end), .done(emu_done), .net_time(net_time),
    .stall_cycles(stall_cycles), .cl(cl), .cl_next(cl_next), .cl_prev(cl_prev),
    .cl_e(cl_e), .cl_w(cl_w), .cl_n(cl_n), .cl_s(cl_s),
    .has_e(has_e), .has_w(has_w), .has_n(has_n), .has_s(has_s), .cx(cx), .cy(cy));

  // ---------------- state memory ----------------
  node_state_t [NN-1:0] r_q, w_q, st_cur, st_nxt, ns_q;

  state_memory #(.N_CL(N_CL), .NN(NN)) u_smem (
    .clk(clk), .re(running && !phase2), .raddr(cl_next),
    .we(running && !phase2), .waddr(cl_prev),
    .r_load(running && phase2), .r_stall(ps_step), .r_stall_d(st_nxt),
    .w_load(running && phase2), .w_d(ns_q), .r_q(r_q), .w_q(w_q));

  // Initial states replace R during network cycle 0 (init_done low).
  always_comb
    for (int n = 0; n < NN; n++) begin
      automatic int gx = int'(cx) * PHY_X + n % PHY_X;
      automatic int gy = int'(cy) * PHY_Y + n / PHY_X;
      st_cur[n] = init_done ? r_q[n] : node_init(32'(gy * MESH_X + gx));
    end

  // ---------------- out and in buffers ----------------
  link_t [PHY_Y-1:0] q_out_e, q_out_w, own_e, nb_w, ib_e, in_e, in_w;
  link_t [PHY_X-1:0] q_out_n, q_out_s, own_s, nb_n, ib_s, in_n, in_s;

  out_buffer #(.N_CL(N_CL), .PHY_X(PHY_X), .PHY_Y(PHY_Y)) u_obuf (
    .clk(clk), .we(running && phase2), .waddr(cl),
    .wd_e(q_out_e), .wd_w(q_out_w), .wd_n(q_out_n), .wd_s(q_out_s),
    .raddr_own(cl), .raddr_e(cl_e), .raddr_s(cl_s),
    .own_e(own_e), .own_s(own_s), .nb_w(nb_w), .nb_n(nb_n));

  in_buffer #(.N_CL(N_CL), .PHY_X(PHY_X), .PHY_Y(PHY_Y)) u_ibuf (
    .clk(clk), .we(running && phase2), .waddr(cl), .wd_e(own_e), .wd_s(own_s),
    .raddr_w(cl_w), .raddr_n(cl_n), .nb_e(ib_e), .nb_s(ib_s));

  // Boundary inputs: nothing enters from outside the mesh or in cycle 0.
  always_comb begin
    in_e = (init_done && has_e) ? nb_w : '0;
    in_w = (init_done && has_w) ? ib_e : '0;
    in_n = (init_done && has_n) ? ib_s : '0;
    in_s = (init_done && has_s) ? nb_n : '0;
  end

  // ---------------- physical cluster ----------------
  node_ev_t [NN-1:0] ev;

  phys_cluster #(.N_CL(N_CL), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .PHY_X(PHY_X), .PHY_Y(PHY_Y)) u_pc (
    .clk(clk), .state_update(state_update), .ps_step(ps_step), .cluster(cl),
    .base_x(COORD_W'(int'(cx) * PHY_X)), .base_y(COORD_W'(int'(cy) * PHY_Y)),
    .net_time(net_time), .end_time(end_time), .threshold(threshold),
    .st_i(st_cur), .in_e(in_e), .in_w(in_w), .in_n(in_n), .in_s(in_s),
    .st_o(st_nxt), .ns_q(ns_q), .q_out_e(q_out_e), .q_out_w(q_out_w),
    .q_out_n(q_out_n), .q_out_s(q_out_s), .ev(ev), .stall_req(stall_req));

  // ---------------- run control and statistics ----------------
  logic rep_busy;

  sim_controller #(.NN(NN), .NODES(MESH_X * MESH_Y)) u_sim (
    .clk(clk), .rst(rst), .start(start), .warmup(warmup), .measure(measure),
    .thr_first(thr_first), .thr_step(thr_step), .num_rates(num_rates), .lat_limit(lat_limit),
    .active(state_update || ps_step), .ev(ev), .cycle_end(cycle_end), .emu_done(emu_done),
    .net_time(net_time), .stall_cycles(stall_cycles), .rep_busy(rep_busy),
    .emu_rst(emu_rst), .emu_go(emu_go), .halt_req(halt_req), .threshold(threshold),
    .end_time(end_time), .res_valid(res_valid), .res_rate(res_rate),
    .res_threshold(res_threshold), .res_packets(res_packets), .res_latency(res_latency),
    .res_cycles(res_cycles), .res_stalls(res_stalls), .res_unstable(res_unstable),
    .led_unstable(led_unstable), .busy(busy), .all_done(all_done));

  // ---------------- result link to the host ----------------
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst(rst), .load(res_valid), .rate(res_rate), .packets(res_packets),
    .latency(res_latency), .cycles(res_cycles), .txd(uart_txd), .busy(rep_busy));

  initial assert (N_CL >= 2 && MESH_X % PHY_X == 0 && MESH_Y % PHY_Y == 0 &&
                  MESH_X <= 128 && MESH_Y <= 128)
    else $error("noc_emulator: unsupported mesh / physical cluster size");

endmodule
