// tb_noc_full: one complete emulation of the full-size design, a 128x128 mesh
// (16,384 nodes) emulated by a 2x2 physical cluster (4096 logical clusters),
// with every parameter at its default.
//
// One run at a low injection rate (about 0.001 packets per node per cycle)
// with no warm-up and a 4-cycle measurement phase; the run ends when every
// measured packet has arrived. Checks: the run is stable, at least one packet
// was measured, the average latency lies between the smallest possible
// latency (14 cycles, a packet to its own node) and the largest zero-load one
// for this mesh (5*254 + 14 cycles, corner to corner), and the run took at
// least as many FPGA cycles as 2 x 4096 per emulated network cycle, and the
// 16-byte result record arrives intact on the 0.5 Mbit/s serial link.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_noc_full;
  import noc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic res_valid, res_unstable, led_unstable, busy, all_done;
  logic [7:0]  res_rate;
  logic [31:0] res_threshold, res_packets, res_stalls;
  logic [47:0] res_latency;
  logic [TS_W-1:0] res_cycles;
  int checks = 0, failures = 0;
  longint fpga_cycles = 0;
  bit seen = 1'b0;
  logic txd;
  logic [127:0] exp_rec = '0, got_rec = '0;

  // result link at its default 200 clock cycles per bit: decode one record
  initial begin
    for (int k = 0; k < 16; k++) begin
      @(negedge txd);
      repeat (100) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (200) @(posedge clk);
        got_rec[k*8 + i] = txd;
      end
      repeat (200) @(posedge clk);
    end
  end

  always #5 clk = ~clk;

  noc_emulator u_emu (
    .clk(clk), .rst(rst), .start(start), .warmup(28'd0), .measure(28'd4),
    .thr_first(32'd4294967), .thr_step(32'd0), .num_rates(8'd1), .lat_limit(16'd2000),
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

  always @(posedge clk) if (u_emu.running) fpga_cycles++;

  always @(posedge clk)
    if (res_valid) begin
      real avg;
      seen = 1'b1;
      exp_rec = {4'h0, res_cycles, res_latency, res_packets, res_rate, 8'hA5};
      avg = (res_packets != 0) ? real'(res_latency) / real'(res_packets) : 0.0;
      $display("packets=%0d latency=%0d avg=%f cycles=%0d stalls=%0d unstable=%0b fpga_cycles=%0d",
               res_packets, res_latency, avg, res_cycles, res_stalls, res_unstable, fpga_cycles);
      check(!res_unstable, "run is stable");
      check(res_packets > 0, "packets measured");
      check(avg >= 14.0 && avg <= 1284.0, "average latency within the zero-load bounds");
      check(fpga_cycles >= longint'(res_cycles) * 8192, "2 x 4096 FPGA cycles per network cycle");
    end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    wait (all_done);
    check(seen, "result reported");
    check(got_rec == exp_rec, "result record sent on the serial link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
