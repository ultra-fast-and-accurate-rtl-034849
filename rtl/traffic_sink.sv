// traffic_sink: ejects packets at their destination and measures latency.
//
// Every valid flit leaving the router's local output is consumed at once and a
// credit for its VC is returned to the router in the next network cycle. The
// sink remembers, per VC, the upper timestamp half carried by the last body
// flit (type 2'b11); when the tail flit (type 2'b01) arrives it joins the lower
// half from the tail into the packet's 28-bit injection timestamp and reports
// a received packet with latency = network time - injection timestamp. The
// caller accumulates the packet count and the total latency. TDM form: state
// in, next state out, combinational; the flit input is the router's lt_reg of
// the previous network cycle. Keeping the upper half per VC (packets of
// different VCs interleave at the ejection port) is this design's choice.
module traffic_sink (
  input  logic                     state_update,
  input  logic [noc_pkg::TS_W-1:0] net_time,
  input  noc_pkg::flit_t           in_flit,
  input  noc_pkg::sink_state_t     st_i,
  output noc_pkg::sink_state_t     st_o,
  output logic                     rcv,        // a packet was completely received
  output logic [noc_pkg::TS_W-1:0] rcv_ts,     // its injection timestamp
  output logic [noc_pkg::TS_W-1:0] rcv_lat     // its latency in network cycles
);
  import noc_pkg::*;
  logic [VCI_W-1:0] vc;
  always_comb begin
    st_o    = st_i;
    rcv     = 1'b0;
    vc      = VCI_W'(f_vc(in_flit));
    rcv_ts  = {st_i.ts_hi[vc], f_data(in_flit)};
    rcv_lat = net_time - rcv_ts;
    if (state_update) begin
      st_o.cred_out = '0;
      if (f_valid(in_flit)) begin
        st_o.cred_out[vc] = 1'b1;
        if (f_type(in_flit) == FT_BTS)  st_o.ts_hi[vc] = f_data(in_flit);
        if (f_type(in_flit) == FT_TAIL) rcv = 1'b1;
      end
    end
  end
endmodule
