// tb_state_memory: random reads, writes and register loads against a model
// kept here: a synchronous-read memory with write-first bypass, register R
// loaded from the memory output or from the stall path, register W loaded
// from its data input and written back to the memory. 8 clusters, 2 nodes.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_state_memory;
  import noc_pkg::*;
  localparam int NC = 8, NN = 2;
  logic clk = 0, re, we, r_load, r_stall, w_load;
  logic [2:0] raddr, waddr;
  node_state_t [NN-1:0] r_stall_d, w_d, r_q, w_q;
  int checks = 0, failures = 0;

  state_memory #(.N_CL(NC), .NN(NN)) dut (
    .clk(clk), .re(re), .raddr(raddr), .we(we), .waddr(waddr), .r_load(r_load), .r_stall(r_stall),
    .r_stall_d(r_stall_d), .w_load(w_load), .w_d(w_d), .r_q(r_q), .w_q(w_q));

  always #5 clk = ~clk;

  function automatic node_state_t [NN-1:0] rnd_state();
    logic [$bits(node_state_t)*NN-1:0] b;
    for (int i = 0; i < $bits(b); i += 32) b[i +: 32] = $urandom;
    return b;
  endfunction

  node_state_t [NN-1:0] m [NC];
  node_state_t [NN-1:0] e_rd, e_r, e_w;

  initial begin
    re = 0; we = 0; r_load = 0; r_stall = 0; w_load = 1; raddr = 0; waddr = 0;
    r_stall_d = '0; w_d = '0;
    // fill the memory through W
    for (int a = 0; a < NC; a++) begin
      w_d = rnd_state(); w_load = 1; we = 0;
      @(posedge clk); #1;
      m[a] = w_d; e_w = w_d;
      w_load = 0; we = 1; waddr = 3'(a);
      @(posedge clk); #1;
    end
    we = 0; re = 1; raddr = 0; r_load = 0; w_load = 0;
    @(posedge clk); #1;
    e_rd = m[0]; e_r = r_q;
    for (int i = 0; i < 3000; i++) begin
      node_state_t [NN-1:0] n_rd, n_r, n_w;
      re = $urandom % 2; we = $urandom % 2; r_load = $urandom % 2; r_stall = ($urandom % 4) == 0;
      w_load = $urandom % 2;
      raddr = 3'($urandom); waddr = ($urandom % 3 == 0) ? raddr : 3'($urandom);
      r_stall_d = rnd_state(); w_d = rnd_state();
      #1;
      n_rd = e_rd; n_r = e_r; n_w = e_w;
      if (re) n_rd = (we && waddr == raddr) ? e_w : m[raddr];
      if (r_stall) n_r = r_stall_d; else if (r_load) n_r = e_rd;
      if (w_load) n_w = w_d;
      if (we) m[waddr] = e_w;
      @(posedge clk); #1;
      e_rd = n_rd; e_r = n_r; e_w = n_w;
      checks++;
      if (r_q !== e_r || w_q !== e_w) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: R %0b W %0b", i, r_q === e_r, w_q === e_w);
      end
    end
    // read every address back through R
    we = 0; r_stall = 0; w_load = 0;
    for (int a = 0; a < NC; a++) begin
      re = 1; raddr = 3'(a); r_load = 0;
      @(posedge clk); #1;
      re = 0; r_load = 1;
      @(posedge clk); #1;
      checks++;
      if (r_q !== m[a]) begin failures++; $display("FAIL readback of cluster %0d", a); end
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
