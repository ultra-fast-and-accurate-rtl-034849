// tb_noc_emulator: end-to-end test of the emulator on a 4x4 mesh emulated by a
// 2x2 physical cluster (4 logical clusters).
//
// Two sweeps of two runs each are made by the automatic rate sweep:
//   sweep 1, rate 0     : no traffic; nothing may be received, the run ends
//                         right after the measurement phase;
//   sweep 1, 0.005 pkt  : the average packet latency must be close to the
//                         zero-load latency worked out from the pipeline;
//   sweep 2, 0.065 pkt  : near saturation; queues fill and empty, so the
//                         network stalls, but the run stays stable;
//   sweep 2, 0.080 pkt  : beyond saturation; the run is stopped as unstable.
// (The sweep-2 rates and the latency window follow the router configured in
// noc_pkg: lower rates with one VC per port, lower latency with look-ahead.)
// It also checks that a network cycle takes 2*N FPGA cycles when there is no
// stall, and counts how often each mechanism happened: network stall, full
// source queue, VC allocation conflict, switch allocation conflict, credit
// shortage, unstable stop, automatic reset. A mechanism never seen is a failure.
// The serial result link runs at 4 clock cycles per bit here; every record
// it sends is decoded and compared with the results of its run.
//
// Zero-load latency of this design: a packet created at network time t is
// sent by the flit generator at t+1, enters its first router at t+2, spends 5
// cycles per router on H+1 routers and its tail leaves 7 cycles after its
// head: 5*H + 14. For uniform random traffic on a 4x4 mesh, destinations
// including the source, the mean hop count is 2*(16-1)/(3*4) = 2.5, so the
// mean zero-load latency is 26.5 cycles.
module tb_noc_emulator;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4, PX = 2, PY = 2;
  localparam int NCL = (MX / PX) * (MY / PY);
  localparam int CPB = 4;   // result link: 4 clock cycles per bit

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [TS_W-1:0] measure = 28'd400;
  logic [31:0] thr_first = 32'd0, thr_step = 32'd21474836;
  logic [15:0] lat_limit = 16'd150;
  logic res_valid, res_unstable, led_unstable, busy, all_done;
  logic [7:0]  res_rate;
  logic [31:0] res_threshold, res_packets, res_stalls;
  logic [47:0] res_latency;
  logic [TS_W-1:0] res_cycles;

  int checks = 0, failures = 0;
  int n_stall = 0, n_qfull = 0, n_vaconf = 0, n_saconf = 0, n_nocred = 0, n_unstable = 0, n_reset = 0;
  int runs = 0;
  logic txd;

  // result link: decode the serial line and compare each record with res_*
  logic [127:0] exp_rec [$];
  int rec_ok = 0, rec_bad = 0;
  initial begin
    forever begin
      logic [127:0] got;
      for (int k = 0; k < 16; k++) begin
        @(negedge txd);
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          got[k*8 + i] = txd;
        end
        repeat (CPB) @(posedge clk);
      end
      if (exp_rec.size() != 0 && got == exp_rec.pop_front()) rec_ok++;
      else begin
        rec_bad++;
        $display("FAIL: result record %h", got);
      end
    end
  end

  always #5 clk = ~clk;

  noc_emulator #(.MESH_X(MX), .MESH_Y(MY), .PHY_X(PX), .PHY_Y(PY), .CLKS_PER_BIT(CPB)) u_emu (
    .clk(clk), .rst(rst), .start(start), .warmup(28'd200), .measure(measure),
    .thr_first(thr_first), .thr_step(thr_step), .num_rates(8'd2), .lat_limit(lat_limit),
    .res_valid(res_valid), .res_rate(res_rate), .res_threshold(res_threshold),
    .res_packets(res_packets), .res_latency(res_latency), .res_cycles(res_cycles),
    .res_stalls(res_stalls), .res_unstable(res_unstable), .led_unstable(led_unstable),
    .busy(busy), .all_done(all_done), .uart_txd(txd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters (node 0 and node 3 of the physical cluster are probed)
  always @(posedge clk) begin
    if (u_emu.ps_step) n_stall++;
    if (u_emu.emu_rst) n_reset++;
    if (u_emu.state_update) begin
      if (u_emu.u_pc.g_y[0].g_x[0].u_node.st_i.g.q_cnt == SQ_CNT_W'(SQ_DEPTH)) n_qfull++;
      if (u_emu.u_pc.g_y[1].g_x[1].u_node.st_i.g.q_cnt == SQ_CNT_W'(SQ_DEPTH)) n_qfull++;
      if ((u_emu.u_pc.g_y[0].g_x[0].u_node.u_router.va_req & ~u_emu.u_pc.g_y[0].g_x[0].u_node.u_router.va_gnt) != '0) n_vaconf++;
      if ((u_emu.u_pc.g_y[1].g_x[1].u_node.u_router.va_req & ~u_emu.u_pc.g_y[1].g_x[1].u_node.u_router.va_gnt) != '0) n_vaconf++;
      if ((u_emu.u_pc.g_y[0].g_x[0].u_node.u_router.sa_req & ~u_emu.u_pc.g_y[0].g_x[0].u_node.u_router.sa_gnt) != '0) n_saconf++;
      if ((u_emu.u_pc.g_y[1].g_x[1].u_node.u_router.sa_req & ~u_emu.u_pc.g_y[1].g_x[1].u_node.u_router.sa_gnt) != '0) n_saconf++;
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NUM_VC; v++)
          if (u_emu.u_pc.g_y[0].g_x[0].u_node.st_i.r.ivc[p][v].st == VC_ACTIVE &&
              u_emu.u_pc.g_y[0].g_x[0].u_node.st_i.r.ivc[p][v].cnt != 0 &&
              u_emu.u_pc.g_y[0].g_x[0].u_node.st_i.r.cred[u_emu.u_pc.g_y[0].g_x[0].u_node.st_i.r.ivc[p][v].oport][u_emu.u_pc.g_y[0].g_x[0].u_node.st_i.r.ivc[p][v].ovc] == 0)
            n_nocred++;
    end
  end

  // FPGA cycles per network cycle, stall cycles excluded
  int cyc_in = 0, stall_in = 0, period_ok = 0, period_bad = 0;
  bit first_period = 1'b1;
  logic [TS_W-1:0] last_t = '0;
  always @(posedge clk) begin
    if (u_emu.emu_rst) begin
      first_period = 1'b1;
      cyc_in = 0;
      stall_in = 0;
    end else if (u_emu.running) begin
      if (u_emu.net_time != last_t) begin
        if (!first_period) begin
          if (cyc_in - stall_in == 2 * NCL) period_ok++;
          else begin
            period_bad++;
            $display("period of %0d FPGA cycles, %0d stalled", cyc_in, stall_in);
          end
        end
        first_period = 1'b0;
        cyc_in = 0;
        stall_in = 0;
      end
      cyc_in++;
      if (u_emu.ps_step) stall_in++;
    end
    last_t = u_emu.net_time;
  end

  // results of each run
  always @(posedge clk) begin
    if (res_valid) begin
      real avg;
      avg = (res_packets != 0) ? real'(res_latency) / real'(res_packets) : 0.0;
      $display("run %0d thr=%0d packets=%0d latency=%0d avg=%f cycles=%0d stalls=%0d unstable=%0b",
               res_rate, res_threshold, res_packets, res_latency, avg, res_cycles, res_stalls, res_unstable);
      if (res_unstable) n_unstable++;
      exp_rec.push_back({4'h0, res_cycles, res_latency, res_packets, res_rate, 8'hA5});
      case (runs)
        0: begin
          check(res_packets == 0, "no packets at rate 0");
          check(res_cycles == 28'd600, "rate-0 run ends right after measurement");
          check(!res_unstable, "rate-0 run is stable");
        end
        1: begin
          check(res_packets > 10, "low-rate run delivers packets");
          check(!res_unstable, "low-rate run is stable");
          check(avg > 24.0 - 3.5 * LOOKAHEAD && avg < 32.0 - 3.5 * LOOKAHEAD,
                "low-rate latency near zero-load (26.5, or 23 with look-ahead)");
          check(res_cycles > 28'd600, "drain after measurement");
        end
        2: begin
          check(!res_unstable, "near-saturation run is stable");
          check(res_stalls > 0, "near-saturation run stalls the network");
          check(avg > 40.0, "near-saturation latency well above zero-load");
        end
        3: begin
          check(res_unstable, "saturated run is stopped as unstable");
          check(avg > 150.0, "unstable run has average latency above the limit");
        end
        default: check(1'b0, "unexpected extra run");
      endcase
      runs++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    wait (all_done);
    check(runs == 2, "first sweep: two runs reported");
    check(!led_unstable, "unstable LED dark after first sweep");
    rst <= 1'b1;
    measure   <= 28'd1500;
    // 0.065 then 0.080 packets / node / cycle; with one VC per port the
    // network saturates earlier: 0.040 then 0.070
    thr_first <= (NUM_VC > 1) ? 32'd279172874 : 32'd171798692;
    thr_step  <= (NUM_VC > 1) ? 32'd64424509  : 32'd128849019;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    wait (all_done);
    repeat (2) @(posedge clk);
    check(runs == 4, "four runs reported");
    check(led_unstable, "unstable LED lit");
    check(period_bad == 0 && period_ok > 100, "2*N FPGA cycles per network cycle");
    repeat (200 * CPB) @(posedge clk);
    check(rec_ok == 4 && rec_bad == 0, "every result record sent to the host");
    $display("mechanisms: stall=%0d qfull=%0d vaconf=%0d saconf=%0d nocred=%0d unstable=%0d reset=%0d",
             n_stall, n_qfull, n_vaconf, n_saconf, n_nocred, n_unstable, n_reset);
    check(n_stall > 0, "network stall happened");
    check(n_qfull > 0, "source queue full happened");
    check(n_vaconf > 0, "VC allocation conflict happened");
    // with one VC per port an output VC, and so an output port, has one owner
    // at a time, so switch allocation can never refuse a request
    if (NUM_VC > 1) check(n_saconf > 0, "switch allocation conflict happened");
    check(n_nocred > 0, "credit shortage happened");
    check(n_unstable > 0, "unstable stop happened");
    check(n_reset >= 4, "automatic reset per rate happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);   // a passing sweep takes about 45,000
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
