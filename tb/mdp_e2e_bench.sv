// mdp_e2e_bench: end-to-end test bench for the memory domain protector,
// used by tb_memory_domain_protector and tb_mdp_full, which instantiate the
// protector and connect it here. It holds two cores, a behavioural DRAM controller (20..57 cycles)
// and the refresher in the third arbiter slot.
//
// FULL must match the protector's threshold: 0 for THRESHOLD = 16 (the row
// is hammered 20 times), 1 for the default 5000 (hammered 5004 times).
//
// A monitor on the DRAM-side bus logs each address handshake with the slot
// owner at that cycle. Every legal core transfer is matched with its DRAM
// handshake and must finish exactly DELAY + len - 1 (read) or DELAY + len
// (write b) cycles after it. Data read back are checked against what the
// same core wrote, or against the DRAM model's initial pattern at the
// remapped address, so a core never sees the other core's data.
// Mechanisms counted, each must happen at least once:
//   fixed latency      legal transfers finishing at the exact cycle
//   slot wait          a transfer waiting for its core's slot
//   deferral           a burst that does not fit the rest of its own slot
//                      and goes to the next one
//   remap              core-1 DRAM addresses carrying the window offset
//   isolation          core 1 reads where core 0 wrote and gets its own data
//   decode error rd/wr DECERR answers for out-of-window reads and writes,
//                      never reaching the DRAM
//   refresh event      a row reaching the threshold
//   refresh reads      refresh reads to the neighbours of the hammered row
//                      in the refresher's slot
module mdp_e2e_bench #(
  parameter bit FULL = 1'b0
) (
  output logic               clk,
  output logic               rst,
  output mdp_pkg::axi_req_t  core_req  [2],
  input  mdp_pkg::axi_resp_t core_resp [2],
  input  mdp_pkg::axi_req_t  dram_req,
  output mdp_pkg::axi_resp_t dram_resp,
  input  logic [1:0]         decode_error,
  input  logic               refresh_event,
  input  logic [31:0]        refresh_reads,
  input  logic               refresh_overflow,
  input  logic [1:0]         slot_owner,
  input  logic [8:0]         slot_time
);
  import mdp_pkg::*;
  localparam int N_CORES = 2;
  localparam int DELAY   = 65;
  localparam int THR     = FULL ? 5000 : 16;
  localparam logic [ADDR_W-1:0] STRIDE = 32'h0800_0000;
  localparam logic [ADDR_W-1:0] HAMMER = 32'h0040_0000;   // row 2048, bank 0

  initial begin clk = 1'b0; rst = 1'b1; end
  always #5 clk = ~clk;

  int          n_dram_rd, n_dram_wr;

  axi_manager_bfm u_c0 (.clk, .req (core_req[0]), .resp (core_resp[0]));
  axi_manager_bfm u_c1 (.clk, .req (core_req[1]), .resp (core_resp[1]));

  dram_ctrl_model #(.MIN_LAT(20), .MAX_LAT(57)) u_dram (
    .clk, .rst, .req (dram_req), .resp (dram_resp), .n_reads (n_dram_rd), .n_writes (n_dram_wr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- bus monitor ----------------
  int cyc = 0, slot_idx = 0;
  logic [1:0] prev_owner = '0;
  int slot_at [int];                 // cycle -> slot index (kept short)
  int hs_time [N_CORES][$];          // DRAM handshake cycles per core
  int hs_slot [N_CORES][$];
  int n_latency = 0, n_wait = 0, n_defer = 0, n_remap = 0, n_isol = 0;
  int n_decerr_rd = 0, n_decerr_wr = 0, n_dec_pulses = 0, n_events = 0;
  int n_ref_seen = 0, n_ref_neigh = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      prev_owner <= '0;
    end else begin
      if (slot_owner != prev_owner) slot_idx <= slot_idx + 1;
      prev_owner <= slot_owner;
      slot_at[cyc] = slot_idx + int'(slot_owner != prev_owner);
      if (slot_at.exists(cyc - 4000)) slot_at.delete(cyc - 4000);
      n_dec_pulses += $countones(decode_error);
      if (refresh_event) n_events++;
      if (dram_req.ar.valid && dram_resp.ar_ready) begin
        if (slot_owner == 2'(N_CORES)) begin
          logic [ROW_W-1:0] r;
          r = dram_req.ar.addr[ROW_LSB +: ROW_W];
          n_ref_seen++;
          if (r == HAMMER[ROW_LSB +: ROW_W] - 1 || r == HAMMER[ROW_LSB +: ROW_W] + 1) n_ref_neigh++;
        end else begin
          hs_time[slot_owner].push_back(cyc);
          hs_slot[slot_owner].push_back(slot_at[cyc]);
          check(dram_req.ar.addr >= STRIDE * slot_owner && dram_req.ar.addr < STRIDE * (slot_owner + 1),
                $sformatf("core %0d read %h outside its window", slot_owner, dram_req.ar.addr));
          if (slot_owner == 1) n_remap++;
        end
      end
      if (dram_req.aw.valid && dram_resp.aw_ready) begin
        check(slot_owner < 2'(N_CORES), "only cores write");
        hs_time[slot_owner].push_back(cyc);
        hs_slot[slot_owner].push_back(slot_at[cyc]);
        check(dram_req.aw.addr >= STRIDE * slot_owner && dram_req.aw.addr < STRIDE * (slot_owner + 1),
              $sformatf("core %0d write %h outside its window", slot_owner, dram_req.aw.addr));
        if (slot_owner == 1) n_remap++;
      end
    end
  end

  // ---------------- per-core transfer wrappers ----------------
  logic [DATA_W-1:0] shadow [N_CORES][int];

  function automatic logic [DATA_W-1:0] expect_word(int p, logic [ADDR_W-1:0] a, int k);
    logic [ADDR_W-1:4] wa = a[ADDR_W-1:4] + (ADDR_W-4)'(k);
    if (shadow[p].exists(int'(wa))) return shadow[p][int'(wa)];
    return {4{32'(wa + STRIDE[ADDR_W-1:4] * (ADDR_W-4)'(p)) ^ 32'h5A5A_0000}};
  endfunction

  function automatic bit legal(logic [ADDR_W-1:0] a, int len);
    return 64'(a) + 64'(len + 1) * 16 <= 64'(STRIDE);
  endfunction

  // timing of a legal transfer: DRAM handshake -> end, and slot accounting
  task automatic timing(int p, int t_addr, int t_end, int extra, string what);
    int h, hs;
    if (hs_time[p].size() == 0) begin check(0, {what, ": no DRAM handshake"}); return; end
    h  = hs_time[p].pop_front();
    hs = hs_slot[p].pop_front();
    check(t_end - h == DELAY + extra,
          $sformatf("%s core %0d latency %0d, want %0d", what, p, t_end - h, DELAY + extra));
    if (t_end - h == DELAY + extra) n_latency++;
    if (h - t_addr > 2) n_wait++;
    if (slot_at.exists(t_addr) && hs > slot_at[t_addr] && slot_at[t_addr] % 3 == p) n_defer++;
  endtask

  task automatic rd(input int p, input logic [ADDR_W-1:0] a, input int len);
    int ta, te;
    axi_resp_code_t rr [256];
    logic [DATA_W-1:0] dd [256];
    bit ok = legal(a, len), good = 1;
    if (p == 0) begin u_c0.read(a, 8'(len), 4'(p)); ta = u_c0.t_addr; te = u_c0.t_end; rr = u_c0.rresp; dd = u_c0.rdata; end
    else        begin u_c1.read(a, 8'(len), 4'(p)); ta = u_c1.t_addr; te = u_c1.t_end; rr = u_c1.rresp; dd = u_c1.rdata; end
    for (int k = 0; k <= len; k++)
      if (rr[k] != (ok ? RESP_OKAY : RESP_DECERR) || dd[k] != (ok ? expect_word(p, a, k) : '0)) good = 0;
    check(good, $sformatf("core %0d read %h len %0d data/resp", p, a, len));
    if (ok) timing(p, ta, te, len, "read");
    else if (good) n_decerr_rd++;
  endtask

  task automatic wr(input int p, input logic [ADDR_W-1:0] a, input int len);
    int ta, te;
    axi_resp_code_t r;
    bit ok = legal(a, len);
    if (p == 0) begin u_c0.write(a, 8'(len), 4'(p)); ta = u_c0.t_addr; te = u_c0.t_end; r = u_c0.last_resp; end
    else        begin u_c1.write(a, 8'(len), 4'(p)); ta = u_c1.t_addr; te = u_c1.t_end; r = u_c1.last_resp; end
    check(r == (ok ? RESP_OKAY : RESP_DECERR), $sformatf("core %0d write %h resp %0d", p, a, r));
    if (ok) begin
      for (int k = 0; k <= len; k++) shadow[p][int'(a >> 4) + k] = u_c0.wdata_of(a, k);
      timing(p, ta, te, len + 1, "write");
    end else if (r == RESP_DECERR) n_decerr_wr++;
  endtask

  task automatic random_traffic(input int p, input int n);
    for (int i = 0; i < n; i++) begin
      logic [ADDR_W-1:0] a;
      int len;
      a   = ($urandom_range(9) == 0) ? STRIDE - 32'h100 + (ADDR_W'($urandom_range(15)) << 4)
                                     : 32'h0010_0000 + (ADDR_W'($urandom_range(4095)) << 4);
      len = ($urandom_range(3) == 0) ? $urandom_range(255) : $urandom_range(15);
      if ($urandom_range(1)) rd(p, a, len); else wr(p, a, len);
    end
  endtask

  bit hammer_done = 0;

  initial begin
    int mark;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // remap and isolation: both cores use the same core address 0x100
    wr(0, 32'h100, 3);
    rd(0, 32'h100, 3);
    mark = failures;
    rd(1, 32'h100, 3);                 // sees its own window, not core 0's data
    wr(1, 32'h100, 3);
    rd(1, 32'h100, 3);
    rd(0, 32'h100, 3);                 // core 0's data unchanged by core 1
    if (failures == mark) n_isol++;
    // decode errors
    rd(0, STRIDE, 0);
    wr(1, STRIDE - 32'h10, 1);
    rd(1, 32'hFFFF_FF00, 15);
    // a 256-beat burst fills a slot: the second one goes to the next slot
    rd(0, 32'h2000, 255);
    rd(0, 32'h2000, 255);
    wr(1, 32'h4000, 255);
    wr(1, 32'h8000, 255);

    // rowhammer on core 0 while core 1 runs random traffic
    mark = n_events;
    fork
      begin
        for (int i = 0; i < THR + 4; i++) rd(0, HAMMER + (ADDR_W'(i % 128) << 4), 0);
        hammer_done = 1;
      end
      begin
        while (!hammer_done) random_traffic(1, 1);
      end
    join
    random_traffic(0, FULL ? 20 : 40);
    repeat (4000) @(posedge clk);

    check(n_events > mark, "hammered row reached the threshold");
    check(int'(refresh_reads) == n_ref_seen, $sformatf("refresh reads %0d, seen %0d", refresh_reads, n_ref_seen));
    check(n_ref_seen == 16 * n_events, $sformatf("16 refresh reads per event: %0d for %0d", n_ref_seen, n_events));
    check(!refresh_overflow, "no refresh queue overflow");
    check(n_dec_pulses == n_decerr_rd + n_decerr_wr,
          $sformatf("decode_error pulses %0d, DECERR answers %0d", n_dec_pulses, n_decerr_rd + n_decerr_wr));
    check(hs_time[0].size() == 0 && hs_time[1].size() == 0, "every DRAM handshake belongs to a core transfer");
    $display("mechanisms: latency=%0d wait=%0d defer=%0d remap=%0d isolation=%0d decerr_rd=%0d decerr_wr=%0d events=%0d refresh_reads=%0d neighbour_reads=%0d",
             n_latency, n_wait, n_defer, n_remap, n_isol, n_decerr_rd, n_decerr_wr, n_events, n_ref_seen, n_ref_neigh);
    check(n_latency > 0,   "mechanism: fixed latency");
    check(n_wait > 0,      "mechanism: slot wait");
    check(n_defer > 0,     "mechanism: deferral to the next own slot");
    check(n_remap > 0,     "mechanism: remap");
    check(n_isol > 0,      "mechanism: isolation");
    check(n_decerr_rd > 0, "mechanism: read decode error");
    check(n_decerr_wr > 0, "mechanism: write decode error");
    check(n_events > 0,    "mechanism: refresh event");
    check(n_ref_neigh >= 16, "mechanism: neighbour rows refreshed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FULL ? 4_000_000 : 400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
