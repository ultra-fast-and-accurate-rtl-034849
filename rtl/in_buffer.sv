// in_buffer: copy of the old east and south output data of each logical
// cluster, kept for the clusters emulated after it.
//
// Clusters are emulated in row-major order, so the west and north neighbours
// of cluster j have already been emulated, and have overwritten their out
// buffer entries, when j needs last cycle's data from them. Before cluster j's
// entry is overwritten, its old east and south data (read from the out buffer
// in the first FPGA cycle) is stored here in the second FPGA cycle (we). Only
// these two sides are copied, because only they feed later clusters. Reads
// happen on the falling edge of the first FPGA cycle of j:
//   nb_e : what the west neighbour (raddr_w = j-1) sent eastwards;
//   nb_s : what the north neighbour (raddr_n = j-CX) sent southwards.
//
// Keeping only east and south data follows the document; the word layout per
// side and boundary node is this design's choice.
module in_buffer #(
  parameter int N_CL  = 4096,
  parameter int PHY_X = 2,
  parameter int PHY_Y = 2,
  localparam int CL_W = $clog2(N_CL > 1 ? N_CL : 2)
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [CL_W-1:0]            waddr,
  input  noc_pkg::link_t [PHY_Y-1:0] wd_e,
  input  noc_pkg::link_t [PHY_X-1:0] wd_s,
  input  logic [CL_W-1:0]            raddr_w,
  input  logic [CL_W-1:0]            raddr_n,
  output noc_pkg::link_t [PHY_Y-1:0] nb_e,
  output noc_pkg::link_t [PHY_X-1:0] nb_s
);
  import noc_pkg::*;
  link_t [PHY_Y-1:0] mem_e [N_CL];
  link_t [PHY_X-1:0] mem_s [N_CL];

  always_ff @(posedge clk)
    if (we) begin
      mem_e[waddr] <= wd_e;
      mem_s[waddr] <= wd_s;
    end

  always_ff @(negedge clk) begin
    nb_e <= mem_e[raddr_w];
    nb_s <= mem_s[raddr_n];
  end
endmodule
