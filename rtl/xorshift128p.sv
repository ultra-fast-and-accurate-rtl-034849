// xorshift128p: one step of the xorshift128+ pseudo-random number generator.
//
// The emulator draws its random numbers from xorshift+ generators because they
// are statistically good and cost only shifts, XORs and one 64-bit adder. This
// block is purely combinational: it takes the 128-bit generator state {s0, s1},
// returns the next state and the 64-bit output (new s1 + old s1). The shift
// constants 23/17/26 are those of the published xorshift128+ generator; the
// choice of the 128-bit member of the family is this design's. The state is
// held by the caller (in the emulator it is part of each node's TDM state), so
// any number of logical generators can share one copy of this logic.
module xorshift128p (
  input  logic [63:0] s0_i,
  input  logic [63:0] s1_i,
  output logic [63:0] s0_o,
  output logic [63:0] s1_o,
  output logic [63:0] rnd_o
);
  import noc_pkg::*;
  always_comb begin
    {s0_o, s1_o, rnd_o} = xs128p(s0_i, s1_i);
  end
endmodule
