// tb_vc_allocator: random request patterns against a reference model of
// separable output-first allocation with fixed priority, written as a
// sequential search here, plus the rules every VC allocation must obey:
// grants only to requesters, only free output VCs, no output VC twice.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NP = 5, NV = 2, NI = NP * NV;
  logic [NI-1:0] req, gnt;
  logic [NI-1:0][PORT_W-1:0] req_port;
  logic [NP-1:0][NV-1:0] ovc_free;
  logic [NI-1:0][VCI_W-1:0] gnt_vc;
  int checks = 0, failures = 0;

  vc_allocator #(.NP(NP), .NV(NV)) dut (.req(req), .req_port(req_port), .ovc_free(ovc_free),
                                        .gnt(gnt), .gnt_vc(gnt_vc));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int winner [NP][NV];
      bit eg [NI];
      int ev [NI];
      bit used [NP][NV];
      req = NI'($urandom);
      for (int i = 0; i < NI; i++) req_port[i] = PORT_W'($urandom % NP);
      ovc_free = (NP*NV)'($urandom);
      #1;
      // output stage: lowest requesting input per free output VC
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NV; v++) begin
          winner[o][v] = -1;
          if (ovc_free[o][v])
            for (int i = NI - 1; i >= 0; i--)
              if (req[i] && req_port[i] == o) winner[o][v] = i;
        end
      // input stage: lowest VC among those that picked this input
      for (int i = 0; i < NI; i++) begin
        eg[i] = 0; ev[i] = 0;
        for (int v = NV - 1; v >= 0; v--)
          if (winner[req_port[i]][v] == i) begin eg[i] = 1; ev[i] = v; end
      end
      for (int o = 0; o < NP; o++) for (int v = 0; v < NV; v++) used[o][v] = 0;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (gnt[i] !== eg[i] || (eg[i] && gnt_vc[i] != ev[i])) begin
          failures++;
          $display("FAIL t=%0d input %0d: gnt %0b/%0d expected %0b/%0d", t, i, gnt[i], gnt_vc[i], eg[i], ev[i]);
        end
        if (gnt[i]) begin
          checks++;
          if (!req[i] || !ovc_free[req_port[i]][gnt_vc[i]] || used[req_port[i]][gnt_vc[i]]) failures++;
          used[req_port[i]][gnt_vc[i]] = 1;
        end
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
