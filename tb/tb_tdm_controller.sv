// tb_tdm_controller: a 4x2 grid of logical clusters. Checks against values
// worked out here:
//  - each cluster gets two FPGA cycles per network cycle (an update cycle
//    then a second cycle), in row-major order, so one network cycle takes
//    2 x 8 = 16 FPGA cycles when nothing stalls;
//  - neighbour cluster numbers and the has_* edge flags for every cluster;
//  - init_done stays low through network cycle 0 and net_time counts cycles;
//  - a stall request after initialisation turns the update cycle into a
//    packet-source step, holds the cluster and is counted in stall_cycles;
//  - a halt request is obeyed only at the end of a network cycle (done
//    pulse, running low).
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_tdm_controller;
  localparam int CX = 4, CY = 2, N = CX * CY;
  logic clk = 0, rst, go, halt_req, stall_req;
  logic running, phase2, su, ps_step, init_done, cycle_end, done;
  logic [27:0] net_time;
  logic [31:0] stall_cycles;
  logic [2:0] cl, cl_next, cl_prev, cl_e, cl_w, cl_n, cl_s;
  logic has_e, has_w, has_n, has_s;
  logic [15:0] cx, cy;
  int checks = 0, failures = 0;

  tdm_controller #(.CX(CX), .CY(CY)) dut (
    .clk(clk), .rst(rst), .go(go), .halt_req(halt_req), .stall_req(stall_req),
    .running(running), .phase2(phase2), .state_update(su), .ps_step(ps_step),
    .init_done(init_done), .cycle_end(cycle_end), .done(done), .net_time(net_time),
    .stall_cycles(stall_cycles), .cl(cl), .cl_next(cl_next), .cl_prev(cl_prev), .cl_e(cl_e),
    .cl_w(cl_w), .cl_n(cl_n), .cl_s(cl_s), .has_e(has_e), .has_w(has_w), .has_n(has_n),
    .has_s(has_s), .cx(cx), .cy(cy));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cl %0d, t %0d)", what, cl, net_time); end
  endtask

  initial begin
    int stalls;
    rst = 1; go = 0; halt_req = 0; stall_req = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0; go = 1;
    @(posedge clk); #1 go = 0;
    // three network cycles without stalls
    for (int t = 0; t < 3; t++)
      for (int c = 0; c < N; c++) begin
        int x, y;
        x = c % CX; y = c / CX;
        chk(running && su && !phase2 && !ps_step && cl == 3'(c), "update cycle");
        chk(int'(cx) == x && int'(cy) == y, "cluster coordinates");
        chk(has_e == (x < CX - 1) && has_w == (x > 0) && has_n == (y > 0) && has_s == (y < CY - 1),
            "edge flags");
        if (x < CX - 1) chk(cl_e == 3'(c + 1), "east neighbour");
        if (x > 0)      chk(cl_w == 3'(c - 1), "west neighbour");
        if (y > 0)      chk(cl_n == 3'(c - CX), "north neighbour");
        if (y < CY - 1) chk(cl_s == 3'(c + CX), "south neighbour");
        chk(cl_next == 3'((c + 1) % N) && cl_prev == 3'((c + N - 1) % N), "next/previous");
        chk(init_done == (t > 0) && net_time == 28'(t), "init_done / net_time");
        @(posedge clk); #1;
        chk(phase2 && !su && cycle_end == (c == N - 1), "second cycle");
        @(posedge clk); #1;
      end
    // stall: request it for 5 FPGA update slots on cluster 2
    while (cl != 3'd2 || phase2) begin @(posedge clk); #1; end
    stall_req = 1;
    #1;
    stalls = 0;
    for (int k = 0; k < 5; k++) begin
      chk(ps_step && !su && cl == 3'd2 && !phase2, "stalled slot");
      @(posedge clk); #1;
      stalls++;
    end
    chk(stall_cycles == 32'(stalls), "stall counter");
    stall_req = 0;
    #1 chk(su && cl == 3'd2, "update after the stall");
    // a full network cycle still takes 2N FPGA cycles
    while (!cycle_end) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    begin
      int n = 0;
      logic [27:0] t0;
      t0 = net_time;
      do begin @(posedge clk); #1; n++; end while (net_time == t0);
      chk(n == 2 * N, $sformatf("network cycle took %0d FPGA cycles", n));
    end
    // halt: raised early, obeyed only at the end of the cycle
    halt_req = 1;
    @(posedge clk); #1;
    chk(running, "no halt in the middle of a network cycle");
    while (!done) begin @(posedge clk); #1; end
    chk(!running && cl == 3'd0, "halted at the end of a network cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
