// memory_domain_protector: lets N_CORES processor cores in separate security
// domains share one DRAM through one AXI4 DRAM controller, without any core
// reading or writing another's data, observing another's activity through
// timing, or corrupting another's data by rowhammering.
//
//   core i --AXI4--> address_mapper i --+
//                                        +--> fixed_time_arbiter --AXI4--> DRAM controller
//   row_refresher (manager port) -------+            |
//         ^ monitors the arbiter -> DRAM bus --------+
//
// * address_mapper i gives core i the window [i*WINDOW_STRIDE,
//   i*WINDOW_STRIDE + WINDOW_SIZE) of the DRAM; the core addresses it from 0.
//   Out-of-window transfers get DECERR and never reach the DRAM.
// * fixed_time_arbiter has N_CORES + 1 ports: one per core and one, the
//   last, for the row refresher. Each port owns a fixed slot of
//   ALLOC_TIME + TIME_BUFFER cycles in turn, and its responses are released
//   a fixed DELAY after the address handshake, so neither bandwidth nor
//   latency carries information between domains.
// * row_refresher counts accesses per DRAM row on the arbiter's output bus
//   and reads the neighbour rows of any row that reaches THRESHOLD accesses.
//
// Ports: core_req/core_resp (one AXI4 subordinate port per core),
// dram_req/dram_resp (AXI4 manager port to the DRAM controller), plus status:
// decode_error (per core, pulse), refresh_event (pulse per threshold hit),
// refresh_reads (refresh reads issued), refresh_overflow (sticky: a threshold
// hit had to wait for room in the refresh queue), and the arbiter's slot
// owner and slot time. One clock, synchronous active-high reset.
//
// Defaults: two cores as in the evaluated system; windows split the 256 MiB
// DRAM by bank (banks 0-3 and 4-7, this design's choice: rows of different
// banks are not neighbours, so no guard rows are needed between these two
// windows); 65-cycle delay and time buffer; 258-cycle accept window (a full
// 256-beat burst fits); row-only tracking with a threshold of 5000.
module memory_domain_protector #(
  parameter int unsigned                N_CORES       = 2,
  parameter int unsigned                ALLOC_TIME    = 258,
  parameter int unsigned                TIME_BUFFER   = 65,
  parameter int unsigned                DELAY         = 65,
  parameter int unsigned                R_DEPTH       = 256,
  parameter bit                         TRACK_BANKS   = 1'b0,
  parameter int unsigned                THRESHOLD     = 5000,
  parameter int unsigned                REFRESH_QUEUE = 4,
  parameter logic [mdp_pkg::ADDR_W-1:0] WINDOW_STRIDE = 32'h0800_0000,
  parameter logic [mdp_pkg::ADDR_W:0]   WINDOW_SIZE   = 33'h0_0800_0000,
  localparam int unsigned N_PORTS = N_CORES + 1,
  localparam int unsigned SEL_W   = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned T_W     = $clog2(ALLOC_TIME + TIME_BUFFER + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  mdp_pkg::axi_req_t  core_req  [N_CORES],
  output mdp_pkg::axi_resp_t core_resp [N_CORES],
  output mdp_pkg::axi_req_t  dram_req,
  input  mdp_pkg::axi_resp_t dram_resp,
  output logic [N_CORES-1:0] decode_error,
  output logic               refresh_event,
  output logic [31:0]        refresh_reads,
  output logic               refresh_overflow,
  output logic [SEL_W-1:0]   slot_owner,
  output logic [T_W-1:0]     slot_time
);
  import mdp_pkg::*;

  axi_req_t    arb_req  [N_PORTS];
  axi_resp_t   arb_resp [N_PORTS];
  port_state_t port_state [N_PORTS];

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    address_mapper #(
      .OFFSET (ADDR_W'(i) * WINDOW_STRIDE),
      .SIZE   (WINDOW_SIZE)
    ) u_map (
      .clk, .rst,
      .s_req  (core_req[i]),
      .s_resp (core_resp[i]),
      .m_req  (arb_req[i]),
      .m_resp (arb_resp[i]),
      .decode_error (decode_error[i])
    );
  end

  row_refresher #(
    .TRACK_BANKS (TRACK_BANKS),
    .THRESHOLD   (THRESHOLD),
    .QUEUE_DEPTH (REFRESH_QUEUE)
  ) u_refresher (
    .clk, .rst,
    .mon_req  (dram_req),
    .mon_resp (dram_resp),
    .m_req    (arb_req[N_CORES]),
    .m_resp   (arb_resp[N_CORES]),
    .refresh_event,
    .refresh_reads,
    .overflow (refresh_overflow)
  );

  fixed_time_arbiter #(
    .N_PORTS     (N_PORTS),
    .ALLOC_TIME  (ALLOC_TIME),
    .TIME_BUFFER (TIME_BUFFER),
    .DELAY       (DELAY),
    .R_DEPTH     (R_DEPTH)
  ) u_arbiter (
    .clk, .rst,
    .core_req  (arb_req),
    .core_resp (arb_resp),
    .dram_req,
    .dram_resp,
    .input_sel (slot_owner),
    .slot_time,
    .port_state
  );

endmodule
