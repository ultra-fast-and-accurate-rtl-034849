// tb_traffic_gen: runs one traffic generator time-multiplexed over two
// logical clusters (N_CL = 2) on a 5x3 mesh, keeping each cluster's state
// record here the way the state memory does. A model of the router's local
// input buffers drains flits at random and returns credits. Checks:
//  - packets are head, PKT_LEN-3 plain body flits, the timestamp body flit
//    and the tail, all on one VC, at most one flit per cycle;
//  - a flit is only sent with a credit (the buffer model never overflows);
//  - the timestamp rebuilt from the last two flits equals, in order, the
//    times the packet source reported for that cluster (the source queue is
//    a FIFO and the clusters' queues do not mix);
//  - destinations lie inside the mesh and cover every node;
//  - the head of a packet created into an empty queue leaves one cycle later;
//  - the offered load of 0.05 packets per cycle is met within 10 %.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_traffic_gen;
  import noc_pkg::*;
  localparam int MX = 5, MY = 3, NC = 2, CYC = 20000;
  logic clk = 0, su, ps_step, gen;
  logic cl;
  logic [COORD_W-1:0] my_x, my_y;
  logic [TS_W-1:0] net_time, gen_ts;
  logic [31:0] threshold;
  logic [NUM_VC-1:0] in_cred;
  tgen_state_t st, st_n;
  int checks = 0, failures = 0;

  traffic_gen #(.N_CL(NC), .MESH_X(MX), .MESH_Y(MY)) dut (
    .clk(clk), .state_update(su), .ps_step(ps_step), .cluster(cl), .my_x(my_x), .my_y(my_y),
    .net_time(net_time), .threshold(threshold), .in_cred(in_cred), .st_i(st), .st_o(st_n),
    .gen(gen), .gen_ts(gen_ts));

  always #5 clk = ~clk;

  tgen_state_t S [NC];
  logic [TS_W-1:0] tsq [NC][$];
  int occ [NC][NUM_VC];
  int idx [NC], pvc [NC];
  logic [DATA_W-1:0] hi [NC];
  int ncyc [NC];
  int pkts = 0, gens = 0, flits = 0;
  bit seen [MX][MY];

  initial begin
    for (int c = 0; c < NC; c++) begin
      S[c] = node_init(32'(c + 7)).g;
      ncyc[c] = 0; idx[c] = 0; hi[c] = '0;
      for (int v = 0; v < NUM_VC; v++) occ[c][v] = 0;
    end
    for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) seen[x][y] = 0;
    su = 1; ps_step = 0; threshold = 32'd214748365; // 0.05
    my_x = 2; my_y = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 2 * CYC; n++) begin
      int c;
      c  = n % NC;
      cl = 1'(c);
      st = S[c];
      net_time = TS_W'(ncyc[c]);
      for (int v = 0; v < NUM_VC; v++) begin
        in_cred[v] = occ[c][v] > 0 && ($urandom % 100) < 60;
        if (in_cred[v]) occ[c][v]--;
      end
      @(negedge clk); #1;
      // packet source
      if (gen) begin
        gens++;
        tsq[c].push_back(gen_ts);
        checks++;
        // the timestamp is the packet source's own time, never ahead of the network
        if (gen_ts != st.ps.time_cnt || gen_ts > net_time) failures++;
      end
      checks++;
      if (st_n.q_cnt > SQ_DEPTH) begin failures++; $display("FAIL source queue overflow"); end
      // flit on the link to the router
      if (f_valid(st_n.link)) begin
        int v;
        flit_t f;
        f = st_n.link;
        v = int'(f_vc(f));
        flits++;
        occ[c][v]++;
        checks++;
        if (occ[c][v] > VC_DEPTH) begin failures++; $display("FAIL buffer overflow on VC %0d", v); end
        if (idx[c] == 0) begin
          logic [COORD_W-1:0] dx, dy;
          dx = f_data(f)[COORD_W-1:0];
          dy = f_data(f)[2*COORD_W-1:COORD_W];
          checks++;
          if (f_type(f) != FT_HEAD || dx >= MX || dy >= MY) begin
            failures++; $display("FAIL head %h", f);
          end else seen[dx][dy] = 1;
          pvc[c] = v;
        end else begin
          logic [1:0] et;
          et = (idx[c] == PKT_LEN - 1) ? FT_TAIL : (idx[c] == PKT_LEN - 2) ? FT_BTS : FT_BODY;
          checks++;
          if (f_type(f) != et || v != pvc[c]) begin
            failures++; $display("FAIL flit %0d of a packet: type %b vc %0d", idx[c], f_type(f), v);
          end
          if (et == FT_BTS) hi[c] = f_data(f);
          if (et == FT_TAIL) begin
            logic [TS_W-1:0] e;
            pkts++;
            e = tsq[c].pop_front();
            checks++;
            if ({hi[c], f_data(f)} != e) begin
              failures++; $display("FAIL timestamp %h expected %h", {hi[c], f_data(f)}, e);
            end
          end
        end
        idx[c] = (idx[c] == PKT_LEN - 1) ? 0 : idx[c] + 1;
      end
      @(posedge clk); #1;
      S[c] = st_n;
      ncyc[c]++;
    end
    checks++;
    if (gens < int'(0.9 * 0.05 * 2 * CYC) || gens > int'(1.1 * 0.05 * 2 * CYC)) begin
      failures++; $display("FAIL %0d packets generated in %0d node cycles", gens, 2 * CYC);
    end
    checks++;
    if (pkts < gens - 2 * SQ_DEPTH) begin failures++; $display("FAIL only %0d of %0d packets sent", pkts, gens); end
    for (int x = 0; x < MX; x++) for (int y = 0; y < MY; y++) begin
      checks++;
      if (!seen[x][y]) begin failures++; $display("FAIL destination (%0d,%0d) never chosen", x, y); end
    end
    // direct latency check: force a packet, then expect the head next cycle
    begin
      tgen_state_t s;
      s = node_init(32'd99).g;
      threshold = 32'hFFFF_FFFF;
      cl = 0; st = s; net_time = 0; in_cred = '0;
      @(negedge clk); #1;
      checks++;
      if (!gen || f_valid(st_n.link)) begin failures++; $display("FAIL packet creation cycle"); end
      @(posedge clk); #1;
      st = st_n; net_time = 1;
      @(negedge clk); #1;
      checks++;
      if (!f_valid(st_n.link) || f_type(st_n.link) != FT_HEAD) begin
        failures++; $display("FAIL head did not leave one cycle after creation");
      end
      @(posedge clk); #1;
    end
    $display("generated %0d, delivered %0d packets, %0d flits", gens, pkts, flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
