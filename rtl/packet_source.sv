// packet_source: Bernoulli injection process with its own time counter.
//
// The packet source does not produce packets, only their injection
// timestamps. It keeps a time counter of its own, separate from the network's
// time. In each step in which its time is not ahead of the network's
// (time_cnt <= net_time) it draws one xorshift128+ number. If the upper 32
// bits are below `threshold` (probability threshold / 2^32 per cycle), it
// creates a packet stamped with its current time and pushes the stamp into
// the source queue. Then its time advances by one. If the queue is full, the
// source keeps the packet pending and does not advance its time: it falls
// behind the network. It catches up later, in extra steps that the emulator
// grants while the network is stalled. One step per call; the state lives in
// the caller (TDM state memory). Purely combinational.
// The stepping rule and the stall interplay follow the document. The
// pending flag and the 32-bit threshold comparison are this design's.
//
// Lint note: only the upper 32 bits of each 64-bit random number are used
// (the low bits of xorshift+ are the weakest), so rnd[31:0] is unused.
module packet_source (
  input  logic                     step,       // perform one step now
  input  logic [noc_pkg::TS_W-1:0] net_time,   // network time counter
  input  logic [31:0]              threshold,  // injection probability * 2^32
  input  logic                     q_full,     // source queue has no free entry
  input  noc_pkg::psrc_state_t     st_i,
  output noc_pkg::psrc_state_t     st_o,
  output logic                     push,       // push push_ts into the source queue
  output logic [noc_pkg::TS_W-1:0] push_ts
);
  import noc_pkg::*;
  logic [63:0] n0, n1, rnd;

  xorshift128p u_rng (.s0_i(st_i.s0), .s1_i(st_i.s1), .s0_o(n0), .s1_o(n1), .rnd_o(rnd));

  always_comb begin
    st_o    = st_i;
    push    = 1'b0;
    push_ts = st_i.time_cnt;
    if (step) begin
      if (st_i.pend) begin
        if (!q_full) begin
          push          = 1'b1;
          st_o.pend     = 1'b0;
          st_o.time_cnt = st_i.time_cnt + 1'b1;
        end
      end else if (st_i.time_cnt <= net_time) begin
        st_o.s0 = n0;
        st_o.s1 = n1;
        if (rnd[63:32] < threshold) begin
          if (!q_full) begin
            push          = 1'b1;
            st_o.time_cnt = st_i.time_cnt + 1'b1;
          end else begin
            st_o.pend     = 1'b1;
          end
        end else begin
          st_o.time_cnt = st_i.time_cnt + 1'b1;
        end
      end
    end
  end
endmodule
