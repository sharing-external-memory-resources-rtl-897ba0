// tb_mdp_full: full-size run of the memory domain protector at its default
// parameters (no override): two cores, 258 + 65 cycle slots, 65-cycle
// deterministic delay, 5000-access rowhammer threshold and 128 MB windows.
// Core 0 reads one row 5004 times while core 1 runs random traffic, so a
// real threshold hit and its 16 neighbour refreshes occur. Stimulus,
// checks, watchdog and the TB_RESULT line are in mdp_e2e_bench.
module tb_mdp_full;
  import mdp_pkg::*;
  logic        clk, rst;
  axi_req_t    core_req  [2];
  axi_resp_t   core_resp [2];
  axi_req_t    dram_req;
  axi_resp_t   dram_resp;
  logic [1:0]  decode_error, slot_owner;
  logic        refresh_event, refresh_overflow;
  logic [31:0] refresh_reads;
  logic [8:0]  slot_time;

  memory_domain_protector u_mdp (
    .clk, .rst, .core_req, .core_resp, .dram_req, .dram_resp, .decode_error,
    .refresh_event, .refresh_reads, .refresh_overflow, .slot_owner, .slot_time);

  mdp_e2e_bench #(.FULL(1'b1)) u_bench (
    .clk, .rst, .core_req, .core_resp, .dram_req, .dram_resp, .decode_error,
    .refresh_event, .refresh_reads, .refresh_overflow, .slot_owner, .slot_time);
endmodule
