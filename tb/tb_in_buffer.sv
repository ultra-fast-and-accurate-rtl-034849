// tb_in_buffer: writes random east and south link records for random
// clusters and checks both falling-edge read ports against a model of the
// two memories (east links read at raddr_w, south links at raddr_n).
// 8 clusters, 2x2 nodes per cluster.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_in_buffer;
  import noc_pkg::*;
  localparam int NC = 8, PX = 2, PY = 2;
  logic clk = 0, we;
  logic [2:0] waddr, raddr_w, raddr_n;
  link_t [PY-1:0] wd_e, nb_e;
  link_t [PX-1:0] wd_s, nb_s;
  int checks = 0, failures = 0;

  in_buffer #(.N_CL(NC), .PHY_X(PX), .PHY_Y(PY)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wd_e(wd_e), .wd_s(wd_s), .raddr_w(raddr_w),
    .raddr_n(raddr_n), .nb_e(nb_e), .nb_s(nb_s));

  always #5 clk = ~clk;

  link_t [PY-1:0] me [NC];
  link_t [PX-1:0] ms [NC];

  function automatic link_t [1:0] rl();
    logic [2*$bits(link_t)-1:0] b;
    for (int i = 0; i < $bits(b); i += 16) b[i +: 16] = 16'($urandom);
    return b;
  endfunction

  initial begin
    we = 1;
    for (int a = 0; a < NC; a++) begin
      waddr = 3'(a); wd_e = rl(); wd_s = rl();
      me[a] = wd_e; ms[a] = wd_s;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = $urandom % 2; waddr = 3'($urandom); wd_e = rl(); wd_s = rl();
      @(posedge clk);
      if (we) begin me[waddr] = wd_e; ms[waddr] = wd_s; end
      #1;
      raddr_w = 3'($urandom); raddr_n = 3'($urandom);
      if (i % 3 == 0) raddr_w = waddr;
      @(negedge clk); #1;
      checks++;
      if (nb_e !== me[raddr_w] || nb_s !== ms[raddr_n]) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d", i);
      end
    end
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
