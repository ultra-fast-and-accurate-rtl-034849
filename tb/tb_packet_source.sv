// tb_packet_source: drives the Bernoulli packet source step by step and
// compares every step with a reference model written here (its own
// xorshift128+ and injection rule). Also checks:
//  - the source never runs ahead of the network time (time_cnt <= net_time+1),
//  - a packet drawn while the queue is full is held and pushed, with its
//    original timestamp, as soon as the queue has room,
//  - the measured injection rate over 20000 cycles matches the threshold
//    (0.1 and 0.5 packets per cycle, within 5 %).
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_packet_source;
  import noc_pkg::*;
  logic            step, q_full, push;
  logic [TS_W-1:0] net_time, push_ts;
  logic [31:0]     threshold;
  psrc_state_t     st, st_n;
  int checks = 0, failures = 0;

  packet_source dut (.step(step), .net_time(net_time), .threshold(threshold), .q_full(q_full),
                     .st_i(st), .st_o(st_n), .push(push), .push_ts(push_ts));

  // reference state
  logic [63:0] m0, m1;
  logic [TS_W-1:0] mt;
  bit mp;

  task automatic ref_step(output bit e_push, output logic [TS_W-1:0] e_ts);
    logic [63:0] x, n1, r;
    e_push = 0; e_ts = mt;
    if (!step) return;
    if (mp) begin
      if (!q_full) begin e_push = 1; mp = 0; mt++; end
      return;
    end
    if (mt > net_time) return;
    x  = m0 ^ (m0 << 23);
    n1 = x ^ m1 ^ (x >> 17) ^ (m1 >> 26);
    r  = n1 + m1;
    m0 = m1; m1 = n1;
    if (r[63:32] < threshold) begin
      if (!q_full) begin e_push = 1; mt++; end
      else mp = 1;
    end else mt++;
  endtask

  task automatic run(int n, int full_pct, int lag, output int pushes);
    bit ep; logic [TS_W-1:0] ets;
    pushes = 0;
    for (int i = 0; i < n; i++) begin
      step   = ($urandom % 100) < 90;
      q_full = ($urandom % 100) < full_pct;
      // network time stays within 'lag' of the source, as it does in the emulator
      net_time = (lag == 0) ? mt + 1000 : mt + TS_W'($urandom % lag) - 1;
      #1;
      ref_step(ep, ets);
      checks++;
      if (push !== ep || (ep && push_ts !== ets) || st_n.time_cnt !== mt || st_n.pend !== mp ||
          st_n.s0 !== m0 || st_n.s1 !== m1) begin
        failures++;
        if (failures < 10)
          $display("FAIL step %0d: push %0b/%0b ts %0d/%0d t %0d/%0d", i, push, ep, push_ts, ets,
                   st_n.time_cnt, mt);
      end
      if (push) pushes++;
      st = st_n;
      #1;
    end
  endtask

  initial begin
    int p;
    st = '0; st.s0 = 64'h0123_4567_89ab_cdef; st.s1 = 64'h0fed_cba9_8765_4321;
    m0 = st.s0; m1 = st.s1; mt = 0; mp = 0;
    step = 0; q_full = 0; net_time = 0; threshold = 32'h4000_0000;
    // random steps, queue often full, network time close to the source
    run(5000, 40, 3, p);
    // injection rate 0.1 with the queue never full
    q_full = 0;
    threshold = 32'd429496730;
    begin
      int steps = 20000, pushes = 0;
      logic [TS_W-1:0] t0;
      t0 = st.time_cnt;
      step = 1; q_full = 0;
      for (int i = 0; i < steps; i++) begin
        net_time = st.time_cnt;
        #1; if (push) pushes++; st = st_n; #1;
      end
      checks++;
      if (pushes < 1900 || pushes > 2100) begin
        failures++; $display("FAIL rate 0.1: %0d packets in %0d cycles", pushes, steps);
      end
      threshold = 32'h8000_0000;
      pushes = 0;
      for (int i = 0; i < steps; i++) begin
        net_time = st.time_cnt;
        #1; if (push) pushes++; st = st_n; #1;
      end
      checks++;
      if (pushes < 9500 || pushes > 10500) begin
        failures++; $display("FAIL rate 0.5: %0d packets in %0d cycles", pushes, steps);
      end
      // one step per network cycle: time_cnt advances by exactly 1
      checks++;
      if (st.time_cnt != t0 + TS_W'(2 * steps)) begin
        failures++; $display("FAIL time counter %0d after %0d cycles", st.time_cnt, 2 * steps);
      end
    end
    // source ahead of network time: nothing changes
    net_time = st.time_cnt - 1'b1;
    step = 1; #1;
    checks++;
    if (push || st_n !== st) begin failures++; $display("FAIL source advanced past network time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
