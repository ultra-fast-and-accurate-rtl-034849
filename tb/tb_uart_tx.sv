// tb_uart_tx: sends three random result records and decodes the serial line
// here, sampling each bit in its middle. Checks the 16-byte record contents,
// the 8N1 framing (start bit low, stop bit high), the bit time of exactly
// CLKS_PER_BIT = 200 clock cycles (0.5 Mbit/s at 100 MHz), that busy covers
// the whole record and that a load while busy is ignored.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_uart_tx;
  localparam int CPB = 200;
  logic clk = 0, rst = 1, load = 0, txd, busy;
  logic [7:0] rate;
  logic [31:0] packets;
  logic [47:0] latency;
  logic [27:0] cycles;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .load(load), .rate(rate),
    .packets(packets), .latency(latency), .cycles(cycles), .txd(txd), .busy(busy));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic get_byte(output logic [7:0] b, output int start_cyc);
    // wait for the falling edge of the start bit
    while (txd) @(posedge clk);
    start_cyc = cyc;
    repeat (CPB / 2) @(posedge clk);
    checks++;
    if (txd) begin failures++; $display("FAIL start bit not low in its middle"); end
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = txd;
    end
    repeat (CPB) @(posedge clk);
    checks++;
    if (!txd) begin failures++; $display("FAIL stop bit not high"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (!txd || busy) begin failures++; $display("FAIL line not idle after reset"); end
    for (int r = 0; r < 3; r++) begin
      logic [127:0] exp, got;
      int t0, t1;
      rate = 8'(r); packets = $urandom; latency = {16'($urandom), 32'($urandom)};
      cycles = 28'($urandom);
      exp = {4'h0, cycles, latency, packets, rate, 8'hA5};
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      // a second load while busy must be ignored
      repeat (5) @(negedge clk);
      packets = ~packets; load = 1; @(negedge clk); load = 0;
      for (int k = 0; k < 16; k++) begin
        logic [7:0] b;
        get_byte(b, t1);
        got[k*8 +: 8] = b;
        if (k == 2) begin
          checks++;
          // byte k+1 starts 10 bit times (plus at most one cycle) after byte k
          if (t1 - t0 < 10 * CPB || t1 - t0 > 10 * CPB + 1) begin
            failures++; $display("FAIL frame period %0d cycles", t1 - t0);
          end
        end
        t0 = t1;
      end
      checks++;
      if (got !== exp) begin failures++; $display("FAIL record %h expected %h", got, exp); end
      repeat (CPB) @(posedge clk);
      checks++;
      if (busy || !txd) begin failures++; $display("FAIL busy after the record"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
