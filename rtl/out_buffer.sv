// out_buffer: output data of every logical cluster - the link values it sends
// across each side of its tile - for the next network cycle.
//
// Four memories, one per side, each with one write and one read port. The
// entry of cluster j is written in the second FPGA cycle of j (we) with its
// new data. Reads happen on the falling edge of the first FPGA cycle of j:
//   own_e / own_s : cluster j's old east/south data, to be saved in the in
//                   buffer before it is overwritten;
//   nb_w          : what the east neighbour (raddr_e = j+1) sent westwards;
//   nb_n          : what the south neighbour (raddr_s = j+CX) sent northwards.
// The east and south neighbours are emulated later in the same network
// cycle, so their entries still hold last cycle's data, as needed.
//
// The out buffer itself follows the document; its per-side word layout and the
// addressing by neighbour cluster number are this design's choices.
module out_buffer #(
  parameter int N_CL  = 4096,
  parameter int PHY_X = 2,
  parameter int PHY_Y = 2,
  localparam int CL_W = $clog2(N_CL > 1 ? N_CL : 2)
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [CL_W-1:0]            waddr,
  input  noc_pkg::link_t [PHY_Y-1:0] wd_e,
  input  noc_pkg::link_t [PHY_Y-1:0] wd_w,
  input  noc_pkg::link_t [PHY_X-1:0] wd_n,
  input  noc_pkg::link_t [PHY_X-1:0] wd_s,
  input  logic [CL_W-1:0]            raddr_own,
  input  logic [CL_W-1:0]            raddr_e,
  input  logic [CL_W-1:0]            raddr_s,
  output noc_pkg::link_t [PHY_Y-1:0] own_e,
  output noc_pkg::link_t [PHY_X-1:0] own_s,
  output noc_pkg::link_t [PHY_Y-1:0] nb_w,
  output noc_pkg::link_t [PHY_X-1:0] nb_n
);
  import noc_pkg::*;
  link_t [PHY_Y-1:0] mem_e [N_CL];
  link_t [PHY_Y-1:0] mem_w [N_CL];
  link_t [PHY_X-1:0] mem_n [N_CL];
  link_t [PHY_X-1:0] mem_s [N_CL];

  always_ff @(posedge clk)
    if (we) begin
      mem_e[waddr] <= wd_e;
      mem_w[waddr] <= wd_w;
      mem_n[waddr] <= wd_n;
      mem_s[waddr] <= wd_s;
    end

  always_ff @(negedge clk) begin
    own_e <= mem_e[raddr_own];
    own_s <= mem_s[raddr_own];
    nb_w  <= mem_w[raddr_e];
    nb_n  <= mem_n[raddr_s];
  end
endmodule
