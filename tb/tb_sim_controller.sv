// tb_sim_controller: drives the simulation controller with a behavioural
// stand-in for the emulation datapath: 4 logical clusters of 2 nodes, one
// network cycle every 4 FPGA cycles, random packet creations whose delivery
// comes back after a chosen latency. The stand-in obeys emu_rst, emu_go and
// halt_req the way the TDM controller does (halt only at a cycle end).
// Checks, against counts kept here:
//  - a run is started for each of num_rates thresholds, thr_first plus
//    k * thr_step, each preceded by a reset;
//  - only packets created inside [warmup, warmup + measure) are counted, and
//    the reported packet count and latency sum match;
//  - a stable run stops once every node's packet source has passed the end of
//    the measurement and every counted packet has arrived;
//  - a run whose average latency exceeds lat_limit after the measurement is
//    stopped early and reported unstable, and the unstable LED stays lit;
//  - the next run does not start while the result link is still busy.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_sim_controller;
  import noc_pkg::*;
  localparam int NN = 2, NCL = 4, NODES = NN * NCL;
  logic clk = 0, rst = 1, start = 0;
  logic [TS_W-1:0] warmup = 28'd50, measure = 28'd200;
  logic [31:0] thr_first = 32'd1000, thr_step = 32'd500;
  logic [7:0] num_rates = 8'd3;
  logic [15:0] lat_limit = 16'd40;
  logic active, cycle_end, emu_done, emu_rst, emu_go, halt_req;
  node_ev_t [NN-1:0] ev;
  logic [TS_W-1:0] net_time, end_time;
  logic [31:0] stall_cycles, threshold;
  logic res_valid, res_unstable, led_unstable, busy, all_done;
  logic rep_busy = 0;
  logic [7:0] res_rate;
  logic [31:0] res_threshold, res_packets, res_stalls;
  logic [47:0] res_latency;
  logic [TS_W-1:0] res_cycles;
  int checks = 0, failures = 0;

  sim_controller #(.NN(NN), .NODES(NODES)) dut (
    .clk(clk), .rst(rst), .start(start), .warmup(warmup), .measure(measure),
    .thr_first(thr_first), .thr_step(thr_step), .num_rates(num_rates), .lat_limit(lat_limit),
    .active(active), .ev(ev), .cycle_end(cycle_end), .emu_done(emu_done), .net_time(net_time),
    .stall_cycles(stall_cycles), .rep_busy(rep_busy), .emu_rst(emu_rst), .emu_go(emu_go), .halt_req(halt_req),
    .threshold(threshold), .end_time(end_time), .res_valid(res_valid), .res_rate(res_rate),
    .res_threshold(res_threshold), .res_packets(res_packets), .res_latency(res_latency),
    .res_cycles(res_cycles), .res_stalls(res_stalls), .res_unstable(res_unstable),
    .led_unstable(led_unstable), .busy(busy), .all_done(all_done));

  always #5 clk = ~clk;

  // ---------------- result link stand-in: busy for 50 cycles per record ----------------
  // (outputs are only defined once reset has taken effect, so nothing is
  // counted while rst is high)
  int rep_cnt = 0, rst_while_busy = 0;
  always @(posedge clk) begin
    if (rst) begin rep_busy <= 0; rep_cnt <= 0; end
    else if (res_valid) begin rep_busy <= 1; rep_cnt <= 50; end
    else if (rep_cnt > 1) rep_cnt <= rep_cnt - 1;
    else begin rep_busy <= 0; rep_cnt <= 0; end
    if (!rst && emu_rst && rep_busy) rst_while_busy++;
  end

  // ---------------- datapath stand-in ----------------
  bit running = 0;
  int slot = 0;
  int lat_of_run [3] = '{10, 25, 90};   // per-run packet latency; the last is too slow
  int run_idx = -1, resets = 0;
  int pend_t [$];                        // delivery times of packets in flight
  int pend_ts [$];
  int exp_pk, exp_lat;

  always_comb begin
    cycle_end = running && slot == NCL - 1;
    active    = running;
  end

  always @(posedge clk) begin
    emu_done <= 0;
    if (rst) begin
      running <= 0; net_time <= 0; slot <= 0; stall_cycles <= 0;
    end else if (emu_rst) begin
      running <= 0; net_time <= 0; slot <= 0; stall_cycles <= 0; resets++;
      pend_t.delete(); pend_ts.delete(); exp_pk = 0; exp_lat = 0;
    end else if (emu_go) begin
      running <= 1; run_idx++;
    end else if (running) begin
      slot <= (slot == NCL - 1) ? 0 : slot + 1;
      if (cycle_end) begin
        net_time <= net_time + 1'b1;
        if (halt_req) begin running <= 0; emu_done <= 1; end
      end
    end
  end

  // events of the current slot, decided just after each rising edge
  always @(posedge clk) begin
    #1;
    ev = '0;
    if (running) begin
      for (int n = 0; n < NN; n++) begin
        // each node's source reaches end_time during that network cycle
        ev[n].crossed = (net_time == end_time);
        if (net_time < end_time + 5 && ($urandom % 8) == 0) begin
          ev[n].gen = 1; ev[n].gen_ts = net_time;
          pend_t.push_back(int'(net_time) + lat_of_run[run_idx]);
          pend_ts.push_back(int'(net_time));
        end
      end
      // deliver at most one due packet per slot
      for (int i = 0; i < pend_t.size(); i++)
        if (pend_t[i] <= int'(net_time)) begin
          ev[0].rcv = 1; ev[0].rcv_ts = TS_W'(pend_ts[i]); ev[0].rcv_lat = net_time - TS_W'(pend_ts[i]);
          if (pend_ts[i] >= warmup && pend_ts[i] < end_time) begin
            exp_pk++; exp_lat += int'(ev[0].rcv_lat);
          end
          pend_t.delete(i); pend_ts.delete(i);
          break;
        end
    end
  end

  initial begin
    ev = '0; net_time = 0; stall_cycles = 0; emu_done = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk); start = 1; @(posedge clk); start = 0;
    for (int r = 0; r < 3; r++) begin
      do begin @(posedge clk); #2; end while (!res_valid);
      $display("run %0d: thr %0d packets %0d/%0d latency %0d/%0d cycles %0d unstable %0b", r,
               res_threshold, res_packets, exp_pk, res_latency, exp_lat, res_cycles, res_unstable);
      checks++;
      if (res_rate != 8'(r) || res_threshold != thr_first + 32'(r) * thr_step) begin
        failures++; $display("FAIL threshold sequence");
      end
      if (r < 2) begin
        checks++;
        if (res_packets != 32'(exp_pk) || res_latency != 48'(exp_lat) || res_unstable) begin
          failures++; $display("FAIL stable run %0d results", r);
        end
        checks++;
        if (res_cycles < end_time || res_cycles > end_time + 28'(lat_of_run[r]) + 5) begin
          failures++; $display("FAIL run %0d stopped at %0d", r, res_cycles);
        end
      end else begin
        checks++;
        if (!res_unstable || !led_unstable || res_cycles > end_time + 5) begin
          failures++; $display("FAIL slow run not stopped as unstable");
        end
      end
    end
    while (!all_done) begin @(posedge clk); #2; end
    checks++;
    if (resets != 3 || busy) begin failures++; $display("FAIL %0d resets", resets); end
    checks++;
    if (rst_while_busy != 0) begin failures++; $display("FAIL next run started while the results were sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
