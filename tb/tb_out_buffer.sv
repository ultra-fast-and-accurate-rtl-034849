// tb_out_buffer: writes random link records for random clusters and checks
// the four falling-edge read ports against a model of the four side
// memories: the cluster's own east and south links and the west and north
// links of the clusters given by raddr_e and raddr_s. A record written at
// a rising edge is visible at the following falling edge. 8 clusters, 2x2.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_out_buffer;
  import noc_pkg::*;
  localparam int NC = 8, PX = 2, PY = 2;
  logic clk = 0, we;
  logic [2:0] waddr, raddr_own, raddr_e, raddr_s;
  link_t [PY-1:0] wd_e, wd_w, own_e, nb_w;
  link_t [PX-1:0] wd_n, wd_s, own_s, nb_n;
  int checks = 0, failures = 0;

  out_buffer #(.N_CL(NC), .PHY_X(PX), .PHY_Y(PY)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wd_e(wd_e), .wd_w(wd_w), .wd_n(wd_n), .wd_s(wd_s),
    .raddr_own(raddr_own), .raddr_e(raddr_e), .raddr_s(raddr_s),
    .own_e(own_e), .own_s(own_s), .nb_w(nb_w), .nb_n(nb_n));

  always #5 clk = ~clk;

  link_t [PY-1:0] me [NC], mw [NC];
  link_t [PX-1:0] mn [NC], ms [NC];

  function automatic link_t [1:0] rl();
    logic [2*$bits(link_t)-1:0] b;
    for (int i = 0; i < $bits(b); i += 16) b[i +: 16] = 16'($urandom);
    return b;
  endfunction

  initial begin
    we = 1;
    for (int a = 0; a < NC; a++) begin
      waddr = 3'(a); wd_e = rl(); wd_w = rl(); wd_n = rl(); wd_s = rl();
      me[a] = wd_e; mw[a] = wd_w; mn[a] = wd_n; ms[a] = wd_s;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = $urandom % 2; waddr = 3'($urandom);
      wd_e = rl(); wd_w = rl(); wd_n = rl(); wd_s = rl();
      @(posedge clk);
      if (we) begin me[waddr] = wd_e; mw[waddr] = wd_w; mn[waddr] = wd_n; ms[waddr] = wd_s; end
      #1;
      raddr_own = 3'($urandom); raddr_e = 3'($urandom); raddr_s = 3'($urandom);
      if (i % 3 == 0) raddr_own = waddr;
      @(negedge clk); #1;
      checks++;
      if (own_e !== me[raddr_own] || own_s !== ms[raddr_own] || nb_w !== mw[raddr_e] ||
          nb_n !== mn[raddr_s]) begin
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
