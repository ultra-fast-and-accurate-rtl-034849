// fixed_arbiter: fixed-priority arbiter, request 0 has the highest priority.
//
// Grants the lowest-numbered active request (one-hot grant, all zero when
// nothing is requested). Used by both allocators of the router, whose arbiter
// type is fixed priority. Purely combinational.
//
// Fixed priority arbitration is what the document specifies for all arbiters;
// the priority order (lowest index first) is this design's choice.
module fixed_arbiter #(
  parameter int N = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  always_comb begin
    gnt = '0;
    for (int i = N - 1; i >= 0; i--)
      if (req[i]) gnt = N'(1) << i;
  end
endmodule
