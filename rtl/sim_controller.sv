// sim_controller: run control and statistics of the emulator.
//
// One run emulates the network at one injection rate in three phases:
// warm-up (network time < warmup), measurement (warmup <= time < end_time,
// end_time = warmup + measure) and drain. Only packets created during
// measurement are counted: their number and total latency are accumulated as
// they arrive. The run ends at the end of a network cycle once (1) every
// packet source has passed end_time, so that no more measured packets can be
// created, and (2) every measured packet has arrived. It is cut short and
// marked unstable if, after measurement, the average latency exceeds
// lat_limit (total latency > lat_limit * packets); led_unstable shows this.
//
// Auto-reset: after each run the results (packets, total latency, emulated
// network cycles, stall FPGA cycles) are presented on res_* with a one-cycle
// res_valid pulse; once the result link has sent them (rep_busy low again)
// the emulator is reset (emu_rst) and the next run starts with the injection
// threshold raised by thr_step, num_rates runs in all. The threshold is the
// per-cycle packet injection probability times 2^32. The phase lengths,
// counters and the auto-reset follow the document; the interface, the end
// condition and the rate sequence are this design's.
module sim_controller #(
  parameter int NN    = 4,        // nodes per physical cluster
  parameter int NODES = 16384     // nodes in the emulated network
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  logic [noc_pkg::TS_W-1:0]      warmup,
  input  logic [noc_pkg::TS_W-1:0]      measure,
  input  logic [31:0]                   thr_first,
  input  logic [31:0]                   thr_step,
  input  logic [7:0]                    num_rates,
  input  logic [15:0]                   lat_limit,
  // from the emulation datapath
  input  logic                          active,     // node events are valid this cycle
  input  noc_pkg::node_ev_t [NN-1:0]    ev,
  input  logic                          cycle_end,
  input  logic                          emu_done,
  input  logic [noc_pkg::TS_W-1:0]      net_time,
  input  logic [31:0]                   stall_cycles,
  input  logic                          rep_busy,   // result link still sending
  // to the emulation datapath
  output logic                          emu_rst,
  output logic                          emu_go,
  output logic                          halt_req,
  output logic [31:0]                   threshold,
  output logic [noc_pkg::TS_W-1:0]      end_time,
  // results
  output logic                          res_valid,
  output logic [7:0]                    res_rate,
  output logic [31:0]                   res_threshold,
  output logic [31:0]                   res_packets,
  output logic [47:0]                   res_latency,
  output logic [noc_pkg::TS_W-1:0]      res_cycles,
  output logic [31:0]                   res_stalls,
  output logic                          res_unstable,
  output logic                          led_unstable,
  output logic                          busy,
  output logic                          all_done
);
  import noc_pkg::*;
  typedef enum logic [2:0] { S_IDLE, S_RST, S_GO, S_RUN, S_REPORT, S_DONE } st_e;
  st_e st;

  logic [31:0] gen_cnt, rcv_cnt, crossed_cnt;
  logic [47:0] lat_sum;
  logic        unstable;
  logic [31:0] gen_add, rcv_add, crossed_add;
  logic [47:0] lat_add;
  logic        after_meas, drained, too_slow;

  assign end_time = warmup + measure;

  always_comb begin
    gen_add = '0; rcv_add = '0; crossed_add = '0; lat_add = '0;
    for (int n = 0; n < NN; n++) begin
      if (ev[n].gen && ev[n].gen_ts >= warmup && ev[n].gen_ts < end_time) gen_add++;
      if (ev[n].rcv && ev[n].rcv_ts >= warmup && ev[n].rcv_ts < end_time) begin
        rcv_add++;
        lat_add = lat_add + 48'(ev[n].rcv_lat);
      end
      if (ev[n].crossed) crossed_add++;
    end
    after_meas = (net_time + 1'b1) >= end_time;
    drained    = after_meas && (crossed_cnt == 32'(NODES)) && (rcv_cnt == gen_cnt);
    too_slow   = after_meas && (lat_sum > 48'(rcv_cnt) * 48'(lat_limit));
    halt_req   = drained || too_slow;
  end

  always_ff @(posedge clk) begin
    emu_rst   <= 1'b0;
    emu_go    <= 1'b0;
    res_valid <= 1'b0;
    if (rst) begin
      st           <= S_IDLE;
      led_unstable <= 1'b0;
      threshold    <= '0;
      res_rate     <= '0;
      unstable     <= 1'b0;
    end else begin
      if (active) begin
        gen_cnt     <= gen_cnt + gen_add;
        rcv_cnt     <= rcv_cnt + rcv_add;
        crossed_cnt <= crossed_cnt + crossed_add;
        lat_sum     <= lat_sum + lat_add;
      end
      if (cycle_end && too_slow && !drained) unstable <= 1'b1;
      case (st)
        S_IDLE: if (start) begin
          st        <= S_RST;
          threshold <= thr_first;
          res_rate  <= '0;
        end
        S_RST: begin
          emu_rst     <= 1'b1;
          gen_cnt     <= '0;
          rcv_cnt     <= '0;
          crossed_cnt <= '0;
          lat_sum     <= '0;
          unstable    <= 1'b0;
          st          <= S_GO;
        end
        S_GO: begin
          emu_go <= 1'b1;
          st     <= S_RUN;
        end
        S_RUN: if (emu_done) begin
          st            <= S_REPORT;
          res_valid     <= 1'b1;
          res_threshold <= threshold;
          res_packets   <= rcv_cnt;
          res_latency   <= lat_sum;
          res_cycles    <= net_time;
          res_stalls    <= stall_cycles;
          res_unstable  <= unstable;
          if (unstable) led_unstable <= 1'b1;
        end
        S_REPORT: if (!rep_busy && !res_valid) begin
          if (res_rate + 1'b1 < num_rates) begin
            res_rate  <= res_rate + 1'b1;
            threshold <= threshold + thr_step;
            st        <= S_RST;
          end else begin
            st <= S_DONE;
          end
        end
        default: ;
      endcase
    end
  end

  assign busy     = (st != S_IDLE) && (st != S_DONE);
  assign all_done = (st == S_DONE);
endmodule
