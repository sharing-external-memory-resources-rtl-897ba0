// tb_bandwidth_sweep: the bandwidth-against-burst-length workload, run on
// the memory domain protector at its default parameters (258 + 65 cycle
// slots, 65-cycle delay, two cores plus the refresher slot).
//
// For a set of burst lengths L from 1 to 256, core 0 issues back-to-back
// reads, then back-to-back writes, once all at start address 0x0 and once
// alternating between 0x0 and 0x800 (two different rows), while core 1 runs
// random traffic of its own all the time. A monitor logs the slot time of every core-0 address
// handshake on the DRAM side. In every slot that core 0 owns and that lies
// wholly inside a run, the handshakes must fall exactly at
//   slot_time = 1 + k * P(L),  k = 0 .. n(L) - 1,
// where P(L) = P(1) + L - 1 is the fixed per-transfer period (measured once
// at L = 1 for reads and for writes), and n(L) is the number of starts that
// pass the fit rule k * P(L) + (L - 1) + 3 <= 258. So the sawtooth of
// bandwidth against burst length follows from the slot arithmetic alone
// and does not depend on the other core's traffic. The bytes per round
// (n * L * 16 every 969 cycles) are printed for each L.
module tb_bandwidth_sweep;
  import mdp_pkg::*;
  localparam int ALLOC = 258;
  localparam int ROUND = 3 * (258 + 65);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  axi_req_t    core_req  [2];
  axi_resp_t   core_resp [2];
  axi_req_t    dram_req;
  axi_resp_t   dram_resp;
  logic [1:0]  decode_error, slot_owner;
  logic        refresh_event, refresh_overflow;
  logic [31:0] refresh_reads;
  logic [8:0]  slot_time;
  int          n_dram_rd, n_dram_wr;

  memory_domain_protector u_mdp (
    .clk, .rst, .core_req, .core_resp, .dram_req, .dram_resp, .decode_error,
    .refresh_event, .refresh_reads, .refresh_overflow, .slot_owner, .slot_time);

  axi_manager_bfm u_c0 (.clk, .req (core_req[0]), .resp (core_resp[0]));
  axi_manager_bfm u_c1 (.clk, .req (core_req[1]), .resp (core_resp[1]));
  dram_ctrl_model #(.MIN_LAT(20), .MAX_LAT(57)) u_dram (
    .clk, .rst, .req (dram_req), .resp (dram_resp), .n_reads (n_dram_rd), .n_writes (n_dram_wr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // core-0 handshakes: slot index and slot time
  int slot_idx = 0;
  logic [1:0] prev_owner = '0;
  int hs_slot [$], hs_t [$];
  always @(posedge clk) if (!rst) begin
    if (slot_owner != prev_owner) slot_idx <= slot_idx + 1;
    prev_owner <= slot_owner;
    if (slot_owner == 2'd0 && ((dram_req.ar.valid && dram_resp.ar_ready) ||
                               (dram_req.aw.valid && dram_resp.aw_ready))) begin
      hs_slot.push_back(slot_idx);
      hs_t.push_back(int'(slot_time));
    end
  end

  // Check the full slots of one run; return the period seen (or -1).
  task automatic analyse(input int len, input int period, input string kind, output int seen_p);
    int first, last, n_full = 0, n_exp = 0;
    seen_p = -1;
    first = hs_slot[0];
    last  = hs_slot[hs_slot.size() - 1];
    if (period > 0)
      while (n_exp * period + (len - 1) + 3 <= ALLOC) n_exp++;
    for (int s = first + 1; s < last; s++) begin
      int ts [$];
      foreach (hs_slot[i]) if (hs_slot[i] == s) ts.push_back(hs_t[i]);
      if (ts.size() == 0) continue;        // a slot of another port
      n_full++;
      if (ts.size() > 1 && seen_p < 0) seen_p = ts[1] - ts[0];
      if (period > 0) begin
        bit ok = (ts.size() == n_exp);
        foreach (ts[k]) if (ts[k] != 1 + k * period) ok = 0;
        check(ok, $sformatf("%s L=%0d: %0d starts in a slot, want %0d with period %0d (first at %0d)",
                            kind, len, ts.size(), n_exp, period, ts[0]));
      end
    end
    check(n_full > 0, $sformatf("%s L=%0d: at least one full slot", kind, len));
    if (period > 0)
      $display("%s L=%3d: %0d transfer(s) per slot, %5d bytes per %0d-cycle round (%.2f B/cycle)",
               kind, len, n_exp, n_exp * len * 16, ROUND, real'(n_exp * len * 16) / ROUND);
  endtask

  bit stop_bg = 0;
  int p_rd1 = -1, p_wr1 = -1;

  task automatic run(input int len, input bit write, input bit alt);
    int n = (len <= 32) ? 24 : 8;
    hs_slot.delete(); hs_t.delete();
    for (int i = 0; i < n; i++) begin
      logic [ADDR_W-1:0] a;
      a = (alt && i % 2 == 1) ? 32'h800 : 32'h0;
      if (write) u_c0.write(a, 8'(len - 1), 4'd0);
      else       u_c0.read (a, 8'(len - 1), 4'd0);
    end
  endtask

  initial begin
    int lens [16] = '{1, 2, 3, 4, 8, 16, 20, 32, 48, 64, 96, 127, 128, 129, 200, 256};
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    fork
      begin
        // period at L = 1, then the sweep
        run(1, 0, 1); analyse(1, -1, "read ", p_rd1);
        run(1, 1, 1); analyse(1, -1, "write", p_wr1);
        check(p_rd1 > 65 && p_wr1 > 65, $sformatf("periods measured: read %0d write %0d", p_rd1, p_wr1));
        $display("period between starts at L = 1: read %0d, write %0d cycles", p_rd1, p_wr1);
        foreach (lens[i]) begin
          int dummy;
          // the same start address, then alternating rows: same timing
          run(lens[i], 0, 0); analyse(lens[i], p_rd1 + lens[i] - 1, "read  same", dummy);
          run(lens[i], 1, 0); analyse(lens[i], p_wr1 + lens[i] - 1, "write same", dummy);
          run(lens[i], 0, 1); analyse(lens[i], p_rd1 + lens[i] - 1, "read  alt ", dummy);
          run(lens[i], 1, 1); analyse(lens[i], p_wr1 + lens[i] - 1, "write alt ", dummy);
        end
        stop_bg = 1;
      end
      begin
        while (!stop_bg) begin
          logic [ADDR_W-1:0] a;
          int len;
          a   = 32'h0010_0000 + (ADDR_W'($urandom_range(4095)) << 4);
          len = $urandom_range(255);
          if ($urandom_range(1)) u_c1.read(a, 8'(len), 4'd1); else u_c1.write(a, 8'(len), 4'd1);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
