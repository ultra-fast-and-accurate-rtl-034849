// tb_traffic_sink: sends random packets on both VCs, interleaved flit by
// flit, into the traffic sink and checks that it returns one credit per flit
// on the flit's VC, rebuilds each 28-bit injection timestamp from the
// last body flit and the tail flit, reports the latency as network time
// minus timestamp, and does nothing while state_update is low.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_traffic_sink;
  import noc_pkg::*;
  logic            su, rcv;
  logic [TS_W-1:0] net_time, rcv_ts, rcv_lat;
  flit_t           f;
  sink_state_t     st, st_n;
  int checks = 0, failures = 0;

  traffic_sink dut (.state_update(su), .net_time(net_time), .in_flit(f), .st_i(st), .st_o(st_n),
                    .rcv(rcv), .rcv_ts(rcv_ts), .rcv_lat(rcv_lat));

  initial begin
    int idx [NUM_VC];
    logic [TS_W-1:0] ts [NUM_VC];
    int got = 0;
    st = '0; su = 1; net_time = 28'd1000; f = '0;
    for (int v = 0; v < NUM_VC; v++) begin idx[v] = 0; ts[v] = TS_W'($urandom); end
    for (int i = 0; i < 4000; i++) begin
      int v;
      logic [1:0] ty;
      logic [DATA_W-1:0] d;
      v  = $urandom % NUM_VC;
      su = ($urandom % 8) != 0;
      net_time = net_time + 1'b1;
      if (($urandom % 4) == 0) f = '0;
      else begin
        ty = (idx[v] == 0) ? FT_HEAD : (idx[v] == PKT_LEN - 1) ? FT_TAIL :
             (idx[v] == PKT_LEN - 2) ? FT_BTS : FT_BODY;
        d  = (ty == FT_BTS) ? ts[v][TS_W-1:DATA_W] : (ty == FT_TAIL) ? ts[v][DATA_W-1:0] :
             DATA_W'($urandom);
        f  = make_flit(ty, VC_W'(v), '0, d);
      end
      #1;
      checks++;
      if (!su) begin
        if (rcv || st_n !== st) begin failures++; $display("FAIL sink acted without state_update"); end
      end else if (!f_valid(f)) begin
        if (rcv || st_n.cred_out != '0) begin failures++; $display("FAIL idle cycle"); end
      end else begin
        logic [NUM_VC-1:0] ec;
        ec = '0; ec[v] = 1'b1;
        if (st_n.cred_out !== ec) begin failures++; $display("FAIL credit %b expected %b", st_n.cred_out, ec); end
        if (f_type(f) == FT_TAIL) begin
          checks++;
          got++;
          if (!rcv || rcv_ts !== ts[v] || rcv_lat !== net_time - ts[v]) begin
            failures++;
            $display("FAIL packet on VC %0d: rcv %0b ts %h expected %h lat %0d", v, rcv, rcv_ts, ts[v], rcv_lat);
          end
        end else if (rcv) begin failures++; $display("FAIL rcv without a tail"); end
        if (idx[v] == PKT_LEN - 1) begin idx[v] = 0; ts[v] = TS_W'($urandom); end
        else idx[v]++;
      end
      if (su) st = st_n;
      #1;
    end
    checks++;
    if (got < 100) begin failures++; $display("FAIL only %0d packets", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
