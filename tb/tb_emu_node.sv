// tb_emu_node: one emulated node (generator, router, sink) time-multiplexed
// over two logical clusters, each a 1x1 mesh, so every packet goes from the
// generator through the router's local ports to the sink. The node state
// records are kept here. Checks:
//  - at 0.002 packets/cycle every packet's latency is the zero-load value
//    for zero hops, 14 network cycles (one cycle in the source queue, five
//    router stages, link to the sink, seven more flits; 13 with the 4-stage
//    look-ahead router), and never less;
//  - every generated packet inside the measurement window is received;
//  - at an offered load of 0.5 packets/cycle the node accepts close to its
//    ejection limit of one flit per cycle (at least 0.115 packets/cycle, i.e.
//    0.92 flits; with one VC a head can only be routed once the previous
//    tail has left, so 0.09 is required then);
//  - the 'crossed' event fires once per cluster, when the packet source
//    time reaches end_time; stall_req is obeyed with packet-source steps.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_emu_node;
  import noc_pkg::*;
  localparam int NC = 2;
  logic clk = 0, su, ps_step, cl;
  logic [TS_W-1:0] net_time, end_time;
  logic [31:0] threshold;
  node_state_t st, st_n;
  link_t [NPORT-1:1] in_link, cur_link, new_link;
  node_ev_t ev;
  logic stall_req;
  int checks = 0, failures = 0;

  emu_node #(.N_CL(NC), .MESH_X(1), .MESH_Y(1)) dut (
    .clk(clk), .state_update(su), .ps_step(ps_step), .cluster(cl), .my_x('0), .my_y('0),
    .net_time(net_time), .end_time(end_time), .threshold(threshold), .st_i(st),
    .in_link(in_link), .st_o(st_n), .cur_link(cur_link), .new_link(new_link), .ev(ev),
    .stall_req(stall_req));

  always #5 clk = ~clk;

  node_state_t S [NC];
  int t [NC];
  int gens, rcvs, crossed, stalls, lat_min, lat_max, lat_bad;
  longint lat_sum;

  task automatic run(int cycles, logic [31:0] thr, int end_at);
    threshold = thr;
    end_time = TS_W'(end_at);
    for (int c = 0; c < NC; c++) begin S[c] = node_init(32'(c + 3)); t[c] = 0; end
    gens = 0; rcvs = 0; crossed = 0; stalls = 0; lat_min = 1 << 30; lat_max = 0; lat_sum = 0;
    for (int n = 0; n < cycles * NC; n++) begin
      int c;
      c = n % NC;
      cl = 1'(c); st = S[c]; net_time = TS_W'(t[c]);
      #1;
      // packet-source steps while the node asks for them
      while (stall_req && t[c] > 0) begin
        su = 0; ps_step = 1; #1;
        @(negedge clk); #1;
        if (ev.gen && ev.gen_ts < end_time) gens++;
        if (ev.crossed) crossed++;
        @(posedge clk); #1;
        S[c] = st_n; st = S[c]; stalls++;
        #1;
      end
      su = 1; ps_step = 0;
      @(negedge clk); #1;
      if (ev.gen && ev.gen_ts < end_time) gens++;
      if (ev.crossed) crossed++;
      if (ev.rcv && ev.rcv_ts < end_time) begin
        rcvs++;
        lat_sum += ev.rcv_lat;
        if (ev.rcv_lat < lat_min) lat_min = ev.rcv_lat;
        if (ev.rcv_lat > lat_max) lat_max = ev.rcv_lat;
      end
      @(posedge clk); #1;
      S[c] = st_n; t[c]++;
    end
  endtask

  initial begin
    su = 1; ps_step = 0; in_link = '0; cl = 0;
    // low load: every packet at zero-load latency
    run(15000, 32'd8589935, 14000);
    $display("low load: %0d generated, %0d received, latency %0d..%0d", gens, rcvs, lat_min, lat_max);
    checks++;
    if (lat_min != 14 - int'(LOOKAHEAD)) begin
      failures++; $display("FAIL zero-load latency %0d, expected %0d", lat_min, 14 - int'(LOOKAHEAD));
    end
    checks++;
    if (rcvs != gens || gens < 30) begin failures++; $display("FAIL %0d generated, %0d received", gens, rcvs); end
    checks++;
    if (crossed != NC) begin failures++; $display("FAIL crossed %0d times", crossed); end
    checks++;
    if (lat_sum > longint'(rcvs) * 16) begin failures++; $display("FAIL average latency too high"); end
    // saturation: accepted throughput near one flit per cycle
    run(4000, 32'h8000_0000, 1 << 27);
    $display("high load: %0d received in %0d node cycles, %0d stall steps", rcvs, 4000 * NC, stalls);
    checks++;
    if (real'(rcvs) / (4000.0 * NC) < ((NUM_VC > 1) ? 0.115 : 0.09)) begin failures++; $display("FAIL accepted throughput too low"); end
    checks++;
    if (real'(rcvs) / (4000.0 * NC) > 0.125) begin failures++; $display("FAIL more than one flit per cycle"); end
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
