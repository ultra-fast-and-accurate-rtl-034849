// tdm_controller: sequencing of the time-division-multiplexed emulation.
//
// The CX x CY logical clusters are emulated one after another in row-major
// order; once all of them have been emulated, one network cycle is complete
// and the network time counter advances. Each logical cluster takes two FPGA
// cycles: in the first (phase 1, state_update high) the physical cluster
// computes its new state; in the second (phase 2) the results are moved to
// register W and the out/in buffers, and R receives the next cluster's state.
// So a network cycle takes 2*CX*CY FPGA cycles when the network is not stalled.
//
// Network stall: if in phase 1 a node of the current cluster has an empty
// source queue while its packet source's time is behind the network time
// (stall_req), the network waits. The controller then stays in phase 1 with
// ps_step high instead of state_update, one FPGA cycle per packet-source step,
// until the condition clears; stall_cycles counts these cycles.
//
// init_done is low after reset and during network cycle 0, so that the
// initial node states are used instead of the (unreset) state memory.
// go starts the emulation after a reset; halt_req stops it at the end of the
// current network cycle (running falls, done pulses).
//
// The two FPGA cycles per logical cluster, row-major order, init_done and the
// network stall condition follow the document; resolving a stall inside the
// first FPGA cycle, one packet-source step per clock, is this design's choice.
module tdm_controller #(
  parameter int CX = 64,                  // logical clusters per row
  parameter int CY = 64,                  // rows of logical clusters
  localparam int N_CL = CX * CY,
  localparam int CL_W = $clog2(N_CL > 1 ? N_CL : 2)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     go,
  input  logic                     halt_req,
  input  logic                     stall_req,
  output logic                     running,
  output logic                     phase2,
  output logic                     state_update,
  output logic                     ps_step,
  output logic                     init_done,
  output logic                     cycle_end,    // last FPGA cycle of a network cycle
  output logic                     done,         // pulse: emulation halted
  output logic [noc_pkg::TS_W-1:0] net_time,
  output logic [31:0]              stall_cycles,
  output logic [CL_W-1:0]          cl,           // cluster emulated now
  output logic [CL_W-1:0]          cl_next,
  output logic [CL_W-1:0]          cl_prev,
  output logic [CL_W-1:0]          cl_e, cl_w, cl_n, cl_s,   // neighbour clusters
  output logic                     has_e, has_w, has_n, has_s,
  output logic [15:0]              cx, cy
);
  always_comb begin
    cl_next = (int'(cl) == N_CL - 1) ? '0 : cl + 1'b1;
    cl_prev = (cl == '0) ? CL_W'(N_CL - 1) : cl - 1'b1;
    cl_e    = cl + 1'b1;
    cl_w    = cl - 1'b1;
    cl_n    = cl - CL_W'(CX);
    cl_s    = cl + CL_W'(CX);
    has_e   = int'(cx) < CX - 1;
    has_w   = cx != '0;
    has_n   = cy != '0;
    has_s   = int'(cy) < CY - 1;
    state_update = running && !phase2 && !(stall_req && init_done);
    ps_step      = running && !phase2 &&  (stall_req && init_done);
    cycle_end    = running && phase2 && (int'(cl) == N_CL - 1);
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      running      <= 1'b0;
      phase2       <= 1'b0;
      init_done    <= 1'b0;
      net_time     <= '0;
      stall_cycles <= '0;
      cl           <= '0;
      cx           <= '0;
      cy           <= '0;
    end else begin
      if (go && !running) running <= 1'b1;
      if (ps_step) stall_cycles <= stall_cycles + 1'b1;
      if (state_update) phase2 <= 1'b1;
      if (running && phase2) begin
        phase2 <= 1'b0;
        cl     <= cl_next;
        if (int'(cx) == CX - 1) begin
          cx <= '0;
          cy <= (int'(cy) == CY - 1) ? '0 : cy + 1'b1;
        end else begin
          cx <= cx + 1'b1;
        end
        if (cycle_end) begin
          net_time  <= net_time + 1'b1;
          init_done <= 1'b1;
          if (halt_req) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
        end
      end
    end
  end
endmodule
