// state_memory: per-logical-cluster register state with the R and W
// registers that decouple it from the physical cluster.
//
// One entry per logical cluster holds the registers of all nodes of the
// physical cluster (node_state_t per node). Timing, for logical cluster j:
//   first FPGA cycle  : the entry of the next cluster (raddr) is read into the
//                       memory output register; register W, which holds the new
//                       state of the previous cluster, is written to its entry
//                       (waddr, we).
//   second FPGA cycle : R <= memory output (state of the next cluster),
//                       W <= new state of cluster j (w_d).
// A write and a read of the same entry in one cycle return the written data
// (only happens with two logical clusters). During network-stall cycles the
// caller rewrites R in place (r_stall, r_stall_d). The memory is never reset:
// the caller ignores R while init_done is low. Behaviour follows the
// document's R/W scheme; the bypass and the stall rewrite are this design's.
module state_memory #(
  parameter int N_CL = 4096,
  parameter int NN   = 4,
  localparam int CL_W = $clog2(N_CL > 1 ? N_CL : 2)
) (
  input  logic                          clk,
  input  logic                          re,         // read raddr into the output register
  input  logic [CL_W-1:0]               raddr,
  input  logic                          we,         // write W into waddr
  input  logic [CL_W-1:0]               waddr,
  input  logic                          r_load,     // R <= memory output
  input  logic                          r_stall,    // R <= r_stall_d
  input  noc_pkg::node_state_t [NN-1:0] r_stall_d,
  input  logic                          w_load,     // W <= w_d
  input  noc_pkg::node_state_t [NN-1:0] w_d,
  output noc_pkg::node_state_t [NN-1:0] r_q,        // register R
  output noc_pkg::node_state_t [NN-1:0] w_q         // register W
);
  import noc_pkg::*;
  node_state_t [NN-1:0] mem [N_CL];
  node_state_t [NN-1:0] rdata;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= w_q;
    if (re) rdata <= (we && waddr == raddr) ? w_q : mem[raddr];
    if (r_stall)     r_q <= r_stall_d;
    else if (r_load) r_q <= rdata;
    if (w_load) w_q <= w_d;
  end
endmodule
