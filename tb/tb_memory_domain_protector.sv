// tb_memory_domain_protector: end-to-end test of the memory domain
// protector, two cores, DRAM controller model (20..57 cycles latency), with
// the rowhammer threshold lowered to 16 so that a threshold hit comes after
// 16 accesses. The stimulus and all checks are in mdp_e2e_bench: exact
// latency from the DRAM handshake (DELAY + len - 1 for reads, DELAY + len
// for write responses), waiting for the own slot, deferral of a burst that
// does not fit the rest of the slot, remapping into each core's window,
// data isolation, DECERR for out-of-window reads and writes, and refresh
// reads of the hammered row's neighbours; each mechanism must occur.
module tb_memory_domain_protector;
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

  memory_domain_protector #(.THRESHOLD(16)) u_mdp (
    .clk, .rst, .core_req, .core_resp, .dram_req, .dram_resp, .decode_error,
    .refresh_event, .refresh_reads, .refresh_overflow, .slot_owner, .slot_time);

  mdp_e2e_bench #(.FULL(1'b0)) u_bench (
    .clk, .rst, .core_req, .core_resp, .dram_req, .dram_resp, .decode_error,
    .refresh_event, .refresh_reads, .refresh_overflow, .slot_owner, .slot_time);
endmodule
