// switch_allocator: separable, output-first switch allocator.
//
// Every input VC that has a flit and a credit for its output VC requests its
// output port. First each output port grants one requesting input VC with a
// fixed-priority arbiter; then each input port, which can send only one flit
// per cycle through the crossbar, accepts the lowest-numbered output port among
// those that granted one of its VCs. The outcome is a matching of input ports
// to output ports for the crossbar. Input VC i is port i/NUM_VC, VC i%NUM_VC.
// Purely combinational.
//
// Separable output-first allocation with fixed priority follows the document;
// the priority order is this design's choice.
module switch_allocator #(
  parameter int NP = noc_pkg::NPORT,
  parameter int NV = noc_pkg::NUM_VC
) (
  input  logic [NP*NV-1:0]                      req,      // input VC requests
  input  logic [NP*NV-1:0][noc_pkg::PORT_W-1:0] req_port, // its output port
  output logic [NP*NV-1:0]                      gnt,      // input VC wins the switch
  output logic [NP-1:0]                         out_vld,  // output port is used
  output logic [NP-1:0][NP*NV-1:0]              out_sel   // one-hot winner per output
);
  localparam int NI = NP * NV;
  logic [NP-1:0][NI-1:0] oreq, ognt;
  logic [NP-1:0][NP-1:0] pin_req, pin_gnt;   // per input port: which outputs granted it

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NI; i++)
        oreq[o][i] = req[i] && (int'(req_port[i]) == o);
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    fixed_arbiter #(.N(NI)) u_arb (.req(oreq[o]), .gnt(ognt[o]));
  end

  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int o = 0; o < NP; o++)
        pin_req[p][o] = |ognt[o][p*NV +: NV];
  end

  for (genvar p = 0; p < NP; p++) begin : g_in
    fixed_arbiter #(.N(NP)) u_arb (.req(pin_req[p]), .gnt(pin_gnt[p]));
  end

  always_comb begin
    gnt     = '0;
    out_vld = '0;
    out_sel = '0;
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NI; i++)
        if (ognt[o][i] && pin_gnt[i / NV][o]) begin
          gnt[i]        = 1'b1;
          out_vld[o]    = 1'b1;
          out_sel[o][i] = 1'b1;
        end
  end
endmodule
