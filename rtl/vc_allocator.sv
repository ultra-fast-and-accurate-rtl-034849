// vc_allocator: separable, output-first virtual-channel allocator.
//
// Each input VC that holds a routed head flit requests one output port. The
// allocator hands it a free VC of that port in two arbitration steps, both with
// fixed-priority arbiters (lowest index wins): first every free output VC picks
// one of the input VCs that request its port, then every input VC that was
// picked by several output VCs of its port keeps the lowest-numbered one. The
// result is a conflict-free assignment (one output VC per input VC and vice
// versa) computed in one cycle; like every separable allocator it may leave a
// grantable pair unmatched. Input VC i is port i/NUM_VC, VC i%NUM_VC.
// Purely combinational; the caller marks granted output VCs busy.
//
// Separable output-first allocation with fixed priority follows the document;
// the priority order and a head's freedom to take any free VC of its output port
// are this design's choices.
module vc_allocator #(
  parameter int NP = noc_pkg::NPORT,
  parameter int NV = noc_pkg::NUM_VC
) (
  input  logic [NP*NV-1:0]                     req,       // input VC requests
  input  logic [NP*NV-1:0][noc_pkg::PORT_W-1:0] req_port, // requested output port
  input  logic [NP-1:0][NV-1:0]                ovc_free,  // output VC is free
  output logic [NP*NV-1:0]                     gnt,       // input VC got an output VC
  output logic [NP*NV-1:0][noc_pkg::VCI_W-1:0] gnt_vc     // which VC of its port
);
  localparam int NI = NP * NV;
  logic [NP-1:0][NV-1:0][NI-1:0] oreq, ognt;   // per output VC: request / grant over inputs

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < NV; v++)
        for (int i = 0; i < NI; i++)
          oreq[o][v][i] = ovc_free[o][v] && req[i] && (int'(req_port[i]) == o);
  end

  for (genvar o = 0; o < NP; o++) begin : g_o
    for (genvar v = 0; v < NV; v++) begin : g_v
      fixed_arbiter #(.N(NI)) u_arb (.req(oreq[o][v]), .gnt(ognt[o][v]));
    end
  end

  // Input stage: keep the lowest-numbered output VC that granted this input.
  always_comb begin
    gnt    = '0;
    gnt_vc = '0;
    for (int i = 0; i < NI; i++)
      for (int o = 0; o < NP; o++)
        for (int v = NV - 1; v >= 0; v--)
          if (ognt[o][v][i]) begin
            gnt[i]    = 1'b1;
            gnt_vc[i] = noc_pkg::VCI_W'(v);
          end
  end
endmodule
