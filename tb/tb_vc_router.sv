// tb_vc_router: one router time-multiplexed over two logical clusters
// (N_CL = 2, routers at (2,2) and (0,4) of a 5x5 mesh), each with its own
// state record kept here, as the state memory would. Every input port
// receives random 8-flit packets on both VCs, sent only with a credit; a
// model of the five downstream buffers drains flits at random and returns
// credits. Checks:
//  - zero-load latency: a head flit entering at network cycle t is on the
//    output link register at t+4, i.e. at the next router at t+5 (one cycle
//    less with noc_pkg::LOOKAHEAD, where the head brings its route along);
//  - each packet leaves on the XY output port, its flits in order and not
//    mixed with another packet on the same output VC;
//  - no downstream buffer overflows (credit flow control) and every packet
//    sent comes out;
//  - the two clusters' buffers and states do not mix.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_vc_router;
  import noc_pkg::*;
  localparam int NC = 2, CYC = 6000;
  logic clk = 0, su, cl;
  logic [COORD_W-1:0] my_x, my_y;
  router_state_t st, st_n;
  flit_t [NPORT-1:0] in_flit;
  logic [NPORT-1:0][NUM_VC-1:0] in_cred;
  int checks = 0, failures = 0;

  vc_router #(.N_CL(NC)) dut (.clk(clk), .state_update(su), .cluster(cl), .my_x(my_x), .my_y(my_y),
                              .st_i(st), .in_flit(in_flit), .in_cred(in_cred), .st_o(st_n));

  always #5 clk = ~clk;

  router_state_t S [NC];
  int cx [NC] = '{2, 0};
  int cy [NC] = '{2, 4};
  // input side
  int icred [NC][NPORT][NUM_VC];
  int iidx  [NC][NPORT][NUM_VC];
  int iid   [NC][NPORT][NUM_VC];
  int idst  [NC][NPORT][NUM_VC];
  // output side
  int occ   [NC][NPORT][NUM_VC];
  int oidx  [NC][NPORT][NUM_VC];
  int oid   [NC][NPORT][NUM_VC];
  int next_id = 1, sent = 0, rcvd = 0, flits_out = 0;
  int load_pct = 0;
  bit no_new = 0;

  function automatic port_e ref_route(int x, int y, int dx, int dy);
    if (dx > x) return P_EAST;
    if (dx < x) return P_WEST;
    if (dy > y) return P_SOUTH;
    if (dy < y) return P_NORTH;
    return P_LOCAL;
  endfunction

  // one network cycle of cluster c; 'force_f' overrides the random input
  task automatic cycle(int c, bit use_force, flit_t force_f [NPORT], output router_state_t o);
    cl = 1'(c); st = S[c];
    my_x = COORD_W'(cx[c]); my_y = COORD_W'(cy[c]);
    for (int p = 0; p < NPORT; p++) begin
      in_flit[p] = '0;
      if (use_force) in_flit[p] = force_f[p];
      else if (($urandom % 100) < load_pct) begin
        int v;
        v = $urandom % NUM_VC;
        if (icred[c][p][v] > 0 && !(no_new && iidx[c][p][v] == 0)) begin
          logic [1:0] ty;
          logic [DATA_W-1:0] d;
          if (iidx[c][p][v] == 0) begin
            int dx, dy;
            dx = $urandom % 5; dy = $urandom % 5;
            idst[c][p][v] = dy * 128 + dx;
            iid[c][p][v]  = next_id++;
            sent++;
          end
          ty = (iidx[c][p][v] == 0) ? FT_HEAD : (iidx[c][p][v] == PKT_LEN - 1) ? FT_TAIL :
               (iidx[c][p][v] == PKT_LEN - 2) ? FT_BTS : FT_BODY;
          d  = (ty == FT_HEAD) ? DATA_W'(idst[c][p][v]) : DATA_W'(iid[c][p][v]);
          // with look-ahead routing the head carries this router's output port
          in_flit[p] = make_flit(ty, VC_W'(v),
                                 PORT_W'(ref_route(cx[c], cy[c], idst[c][p][v] % 128, idst[c][p][v] / 128)), d);
          icred[c][p][v]--;
          iidx[c][p][v] = (iidx[c][p][v] == PKT_LEN - 1) ? 0 : iidx[c][p][v] + 1;
        end
      end
    end
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NUM_VC; v++) begin
        in_cred[o][v] = occ[c][o][v] > 0 && ($urandom % 100) < 70;
        if (in_cred[o][v]) occ[c][o][v]--;
      end
    @(negedge clk); #1;
    o = st_n;
    // returned credits
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++)
        if (st_n.cred_out[p][v]) icred[c][p][v]++;
    // output link registers
    for (int op = 0; op < NPORT; op++)
      if (f_valid(st_n.lt_reg[op])) begin
        flit_t f;
        int v;
        f = st_n.lt_reg[op];
        v = int'(f_vc(f));
        flits_out++;
        occ[c][op][v]++;
        checks++;
        if (occ[c][op][v] > VC_DEPTH) begin failures++; $display("FAIL overflow at output %0d VC %0d", op, v); end
        if (oidx[c][op][v] == 0) begin
          int dx, dy;
          dx = int'(f_data(f)) % 128; dy = int'(f_data(f)) / 128;
          checks++;
          if (f_type(f) != FT_HEAD || ref_route(cx[c], cy[c], dx, dy) != port_e'(op)) begin
            failures++; $display("FAIL cluster %0d output %0d: head %h misrouted", c, op, f);
          end
          oid[c][op][v] = -1;
        end else begin
          logic [1:0] et;
          et = (oidx[c][op][v] == PKT_LEN - 1) ? FT_TAIL : (oidx[c][op][v] == PKT_LEN - 2) ? FT_BTS : FT_BODY;
          checks++;
          if (oid[c][op][v] < 0) oid[c][op][v] = int'(f_data(f));
          if (f_type(f) != et || int'(f_data(f)) != oid[c][op][v]) begin
            failures++;
            $display("FAIL cluster %0d output %0d VC %0d flit %0d: type %b id %0d expected %b id %0d",
                     c, op, v, oidx[c][op][v], f_type(f), f_data(f), et, oid[c][op][v]);
          end
          if (et == FT_TAIL) rcvd++;
        end
        oidx[c][op][v] = (oidx[c][op][v] == PKT_LEN - 1) ? 0 : oidx[c][op][v] + 1;
      end
    @(posedge clk); #1;
    S[c] = st_n;
  endtask

  initial begin
    flit_t none [NPORT];
    flit_t one [NPORT];
    router_state_t o;
    su = 1; cl = 0; st = '0; in_flit = '0; in_cred = '0;
    for (int c = 0; c < NC; c++) begin
      S[c] = node_init(32'(c)).r;
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          icred[c][p][v] = VC_DEPTH; iidx[c][p][v] = 0; occ[c][p][v] = 0; oidx[c][p][v] = 0;
          oid[c][p][v] = -1;
        end
    end
    for (int p = 0; p < NPORT; p++) begin none[p] = '0; one[p] = '0; end
    @(posedge clk); #1;
    // zero-load latency, cluster 0: head from the west port to (4,2), i.e. east
    one[P_WEST] = make_flit(FT_HEAD, 1'b0, PORT_W'(P_EAST), make_addr(7'd4, 7'd2));
    icred[0][P_WEST][0]--;
    sent++;
    begin
      int arrive = -1;
      for (int t = 0; t < 8; t++) begin
        cycle(0, 1, (t == 0) ? one : none, o);
        cycle(1, 1, none, o);   // the other cluster idles in between
        if (arrive < 0 && f_valid(S[0].lt_reg[P_EAST])) arrive = t;
      end
      checks++;
      if (arrive != 4 - int'(LOOKAHEAD)) begin
        failures++; $display("FAIL head reached the link register at t+%0d, expected t+%0d", arrive, 4 - int'(LOOKAHEAD));
      end
      // finish that packet so the output VC is released
      for (int k = 1; k < PKT_LEN; k++) begin
        flit_t b [NPORT];
        for (int p = 0; p < NPORT; p++) b[p] = '0;
        b[P_WEST] = make_flit(k == PKT_LEN - 1 ? FT_TAIL : k == PKT_LEN - 2 ? FT_BTS : FT_BODY, 1'b0, '0,
                              DATA_W'(0));
        while (icred[0][P_WEST][0] == 0) begin cycle(0, 1, none, o); cycle(1, 1, none, o); end
        icred[0][P_WEST][0]--;
        cycle(0, 1, b, o);
        cycle(1, 1, none, o);
      end
      for (int t = 0; t < 20; t++) begin cycle(0, 1, none, o); cycle(1, 1, none, o); end
    end
    // random traffic at two loads
    load_pct = 30;
    for (int n = 0; n < CYC; n++) cycle(n % NC, 0, none, o);
    load_pct = 90;
    for (int n = 0; n < CYC; n++) cycle(n % NC, 0, none, o);
    // drain: finish open packets with full credits, then idle
    load_pct = 100;
    no_new = 1;
    for (int n = 0; n < 1000; n++) cycle(n % NC, 0, none, o);
    checks++;
    if (rcvd != sent) begin failures++; $display("FAIL %0d packets sent, %0d came out", sent, rcvd); end
    $display("%0d packets, %0d flits out", rcvd, flits_out);
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
