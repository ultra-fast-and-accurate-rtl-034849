// tb_switch_allocator: random request patterns against a reference model of
// separable output-first switch allocation with fixed priority, plus the
// matching rules: at most one winner per output port and per input port,
// winners only among requesters, out_sel consistent with gnt.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int NP = 5, NV = 2, NI = NP * NV;
  logic [NI-1:0] req, gnt;
  logic [NI-1:0][PORT_W-1:0] req_port;
  logic [NP-1:0] out_vld;
  logic [NP-1:0][NI-1:0] out_sel;
  int checks = 0, failures = 0;

  switch_allocator #(.NP(NP), .NV(NV)) dut (.req(req), .req_port(req_port), .gnt(gnt),
                                            .out_vld(out_vld), .out_sel(out_sel));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ow [NP];
      bit eg [NI];
      int cnt_in [NP];
      req = NI'($urandom);
      for (int i = 0; i < NI; i++) req_port[i] = PORT_W'($urandom % NP);
      #1;
      for (int o = 0; o < NP; o++) begin
        ow[o] = -1;
        for (int i = NI - 1; i >= 0; i--) if (req[i] && req_port[i] == o) ow[o] = i;
      end
      for (int i = 0; i < NI; i++) eg[i] = 0;
      for (int p = 0; p < NP; p++) begin
        // lowest output whose winner belongs to input port p
        for (int o = 0; o < NP; o++)
          if (ow[o] >= 0 && ow[o] / NV == p) begin eg[ow[o]] = 1; break; end
      end
      for (int p = 0; p < NP; p++) cnt_in[p] = 0;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (gnt[i] !== eg[i]) begin
          failures++;
          $display("FAIL t=%0d input VC %0d: %0b expected %0b", t, i, gnt[i], eg[i]);
        end
        if (gnt[i]) begin
          cnt_in[i / NV]++;
          checks++;
          if (!req[i] || !out_sel[req_port[i]][i] || !out_vld[req_port[i]]) failures++;
        end
      end
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (cnt_in[p] > 1 || !$onehot0(out_sel[p])) failures++;
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
