// tb_phys_cluster: a 2x2 physical cluster emulating a complete 2x2 mesh
// (one logical cluster, nothing attached to its boundary). Each network
// cycle is one state_update; the next state comes back through ns_q, as the
// state memory would return it. Checks:
//  - at 0.002 packets/node/cycle the smallest latency is the zero-hop value
//    (14) and the average lies near 5 x 1 hop + 14 (uniform destinations on
//    a 2x2 mesh average one hop), between 19 and 21 (both 4-stage router
//    figures are lower: 13, and 17 to 19);
//  - every packet generated is delivered (node-to-node links inside the
//    cluster carry flits and credits correctly);
//  - XY routing never sends a flit out of the mesh: the boundary link
//    registers q_out_* never hold a valid flit;
//  - under heavy load the four nodes together accept more than 0.25
//    packets per cycle.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_phys_cluster;
  import noc_pkg::*;
  localparam int NN = 4;
  logic clk = 0, su, ps_step;
  logic [TS_W-1:0] net_time, end_time;
  logic [31:0] threshold;
  node_state_t [NN-1:0] st, st_o, ns_q;
  link_t [1:0] q_out_e, q_out_w, q_out_n, q_out_s;
  node_ev_t [NN-1:0] ev;
  logic stall_req;
  int checks = 0, failures = 0;

  phys_cluster #(.N_CL(2), .MESH_X(2), .MESH_Y(2)) dut (
    .clk(clk), .state_update(su), .ps_step(ps_step), .cluster('0), .base_x('0), .base_y('0),
    .net_time(net_time), .end_time(end_time), .threshold(threshold), .st_i(st),
    .in_e('0), .in_w('0), .in_n('0), .in_s('0), .st_o(st_o), .ns_q(ns_q),
    .q_out_e(q_out_e), .q_out_w(q_out_w), .q_out_n(q_out_n), .q_out_s(q_out_s),
    .ev(ev), .stall_req(stall_req));

  always #5 clk = ~clk;

  int gens, rcvs, lat_min, leaks;
  longint lat_sum;

  task automatic run(int cycles, logic [31:0] thr, int meas, bit use_ns);
    threshold = thr; end_time = TS_W'(meas);
    for (int n = 0; n < NN; n++) st[n] = node_init(32'(n + 11));
    gens = 0; rcvs = 0; lat_min = 1 << 30; lat_sum = 0; leaks = 0;
    for (int t = 0; t < cycles; t++) begin
      net_time = TS_W'(t);
      // stall: packet-source steps until no node asks for one
      while (stall_req && t > 0) begin
        su = 0; ps_step = 1;
        @(negedge clk); #1;
        for (int n = 0; n < NN; n++) if (ev[n].gen && ev[n].gen_ts < end_time) gens++;
        @(posedge clk); #1;
        st = st_o;
        #1;
      end
      su = 1; ps_step = 0;
      @(negedge clk); #1;
      for (int n = 0; n < NN; n++) begin
        if (ev[n].gen && ev[n].gen_ts < end_time) gens++;
        if (ev[n].rcv && ev[n].rcv_ts < end_time) begin
          rcvs++; lat_sum += ev[n].rcv_lat;
          if (ev[n].rcv_lat < lat_min) lat_min = ev[n].rcv_lat;
        end
      end
      @(posedge clk); #1;
      // the registered next state must equal the computed one
      checks++;
      if (ns_q !== st_o) begin failures++; $display("FAIL ns_q differs from st_o"); end
      for (int k = 0; k < 2; k++)
        if (f_valid(q_out_e[k].flit) || f_valid(q_out_w[k].flit) || f_valid(q_out_n[k].flit) ||
            f_valid(q_out_s[k].flit)) leaks++;
      st = use_ns ? ns_q : st_o;
    end
  endtask

  initial begin
    su = 1; ps_step = 0; st = '0; net_time = 0; end_time = 0; threshold = 0;
    run(20000, 32'd8589935, 19000, 1);
    $display("low load: %0d generated, %0d received, min %0d, avg %0.2f", gens, rcvs, lat_min,
             real'(lat_sum) / rcvs);
    checks++;
    if (lat_min != 14 - int'(LOOKAHEAD)) begin failures++; $display("FAIL zero-hop latency %0d", lat_min); end
    checks++;
    if (real'(lat_sum) / rcvs < 19.0 - 2.0 * LOOKAHEAD || real'(lat_sum) / rcvs > 21.0 - 2.0 * LOOKAHEAD) begin
      failures++; $display("FAIL average latency");
    end
    checks++;
    if (rcvs != gens || gens < 100) begin failures++; $display("FAIL packets lost"); end
    checks++;
    if (leaks != 0) begin failures++; $display("FAIL %0d flits left the mesh", leaks); end
    run(5000, 32'h4000_0000, 4000, 0);
    $display("high load: %0d generated, %0d received", gens, rcvs);
    checks++;
    if (real'(rcvs) / 4000.0 < 0.25) begin failures++; $display("FAIL accepted throughput too low"); end
    checks++;
    if (leaks != 0) begin failures++; $display("FAIL %0d flits left the mesh", leaks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
