// tb_fixed_time_arbiter: self-checking test of the fixed time arbiter at its
// default sizes (3 ports, 258 + 65 cycle slots, 65-cycle delay), with a DRAM
// model whose latency varies randomly from 20 to 57 cycles.
// Checks:
//  * every read: last beat exactly DELAY + L - 1 cycles after the ar
//    handshake; every write: response exactly DELAY + L cycles after aw;
//    data and responses correct;
//  * every address handshake happens in the owner's slot, inside the accept
//    window, and the transfer is delivered before that slot ends;
//  * a burst that no longer fits in the window is deferred to a later slot;
//  * isolation: port 0 runs the same sequence twice, alone and with ports 1
//    and 2 saturating the DRAM; the cycles at which its transfers start and
//    finish, counted from a slot boundary, must be identical.
// Covers the published test cases: single and multiple 1-beat transfers,
// slow DRAM, 128-beat and 256-beat bursts.
module tb_fixed_time_arbiter;
  import mdp_pkg::*;

  localparam int unsigned N_PORTS = 3;
  localparam int unsigned ALLOC   = 258;
  localparam int unsigned BUF     = 65;
  localparam int unsigned DELAY   = 65;
  localparam int unsigned SLOT    = ALLOC + BUF;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  axi_req_t    core_req  [N_PORTS];
  axi_resp_t   core_resp [N_PORTS];
  axi_req_t    dram_req;
  axi_resp_t   dram_resp;
  logic [1:0]  input_sel;
  logic [8:0]  slot_time;
  port_state_t port_state [N_PORTS];
  int          n_reads, n_writes;

  fixed_time_arbiter dut (
    .clk, .rst, .core_req, .core_resp, .dram_req, .dram_resp,
    .input_sel, .slot_time, .port_state
  );

  dram_ctrl_model #(.MIN_LAT(20), .MAX_LAT(57)) u_dram (
    .clk, .rst, .req (dram_req), .resp (dram_resp), .n_reads, .n_writes
  );

  axi_manager_bfm u_p0 (.clk, .req (core_req[0]), .resp (core_resp[0]));
  axi_manager_bfm u_p1 (.clk, .req (core_req[1]), .resp (core_resp[1]));
  axi_manager_bfm u_p2 (.clk, .req (core_req[2]), .resp (core_resp[2]));

  int checks = 0, failures = 0;
  int deferred = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- slot bookkeeping (independent model) ----------------
  int cyc = 0;
  int c0 = -1;            // first cycle out of reset
  int model_slot = 0, model_t = 0;
  function automatic int slot_of(int c);  return (c - c0) / int'(SLOT); endfunction
  function automatic int owner_of(int c); return slot_of(c) % int'(N_PORTS); endfunction
  function automatic int slot_time_of(int c); return (c - c0) % int'(SLOT); endfunction
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      model_slot = 0; model_t = 0;
    end else begin
      if (c0 < 0) c0 = cyc;
      check(int'(input_sel) == model_slot % N_PORTS && int'(slot_time) == model_t,
            "tracker position");
      model_t++;
      if (model_t == SLOT) begin model_t = 0; model_slot++; end
    end
  end

  // Address handshakes on the DRAM bus: owner, window.
  always @(posedge clk) if (!rst) begin
    if (dram_req.ar.valid && dram_resp.ar_ready) begin
      check(int'(dram_req.ar.id) == int'(input_sel), "ar in owner's slot");
      check(int'(slot_time) + int'(dram_req.ar.len) + 1 <= int'(ALLOC), "ar inside accept window");
    end
    if (dram_req.aw.valid && dram_resp.aw_ready) begin
      check(int'(dram_req.aw.id) == int'(input_sel), "aw in owner's slot");
      check(int'(slot_time) + int'(dram_req.aw.len) + 1 <= int'(ALLOC), "aw inside accept window");
    end
  end

  // ---------------- reference memory ----------------
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:4]];
  function automatic logic [DATA_W-1:0] expect_word(logic [ADDR_W-1:4] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return {4{32'(a) ^ 32'h5A5A_0000}};
  endfunction

  // Port-specific wrappers: run one transfer and check it.
  task automatic do_read(input int p, input logic [ADDR_W-1:0] addr, input int len,
                         output int t_a, output int t_e);
    logic [DATA_W-1:0] d;
    bit ok = 1;
    case (p)
      0: begin u_p0.read(addr, 8'(len - 1), 4'(p)); t_a = u_p0.t_addr; t_e = u_p0.t_end; end
      1: begin u_p1.read(addr, 8'(len - 1), 4'(p)); t_a = u_p1.t_addr; t_e = u_p1.t_end; end
      default: begin u_p2.read(addr, 8'(len - 1), 4'(p)); t_a = u_p2.t_addr; t_e = u_p2.t_end; end
    endcase
    for (int b = 0; b < len; b++) begin
      case (p)
        0: d = u_p0.rdata[b];
        1: d = u_p1.rdata[b];
        default: d = u_p2.rdata[b];
      endcase
      if (d !== expect_word(addr[ADDR_W-1:4] + (ADDR_W-4)'(b))) ok = 0;
    end
    check(ok, $sformatf("port %0d read data @%h len %0d", p, addr, len));
    check(t_e - t_a == int'(DELAY) + len - 1,
          $sformatf("port %0d read latency %0d, want %0d", p, t_e - t_a, DELAY + len - 1));
    check(slot_of(t_a) == slot_of(t_e) && owner_of(t_a) == p, $sformatf("read delivered within its slot: ta=%0d te=%0d slots %0d %0d owner %0d", t_a, t_e, slot_of(t_a), slot_of(t_e), owner_of(t_a)));
  endtask

  task automatic do_write(input int p, input logic [ADDR_W-1:0] addr, input int len,
                          output int t_a, output int t_e);
    axi_resp_code_t r;
    case (p)
      0: begin u_p0.write(addr, 8'(len - 1), 4'(p)); t_a = u_p0.t_addr; t_e = u_p0.t_end; r = u_p0.last_resp; end
      1: begin u_p1.write(addr, 8'(len - 1), 4'(p)); t_a = u_p1.t_addr; t_e = u_p1.t_end; r = u_p1.last_resp; end
      default: begin u_p2.write(addr, 8'(len - 1), 4'(p)); t_a = u_p2.t_addr; t_e = u_p2.t_end; r = u_p2.last_resp; end
    endcase
    for (int b = 0; b < len; b++)
      ref_mem[addr[ADDR_W-1:4] + (ADDR_W-4)'(b)] = u_p0.wdata_of(addr, b);
    check(r == RESP_OKAY, "write response OKAY");
    check(t_e - t_a == int'(DELAY) + len,
          $sformatf("port %0d write latency %0d, want %0d", p, t_e - t_a, DELAY + len));
    check(slot_of(t_a) == slot_of(t_e) && owner_of(t_a) == p, "write delivered within its slot");
  endtask

  // Port 0 pattern used for the isolation test; returns start/end offsets.
  task automatic port0_pattern(output int offs [16]);
    int t0, ta, te, n = 0;
    // align to the start of a port-0 slot
    do @(posedge clk); while (!(input_sel == 0 && slot_time == 0));
    t0 = cyc;
    for (int i = 0; i < 4; i++) begin
      do_read (0, 32'h0000_4000 + 32'(i) * 32'h800, 1 + i * 40, ta, te);
      offs[n++] = ta - t0; offs[n++] = te - t0;
      do_write(0, 32'h0001_0000 + 32'(i) * 32'h100, 2 + i * 3, ta, te);
      offs[n++] = ta - t0; offs[n++] = te - t0;
    end
  endtask

  bit stop_bg = 0;
  task automatic background(input int p);
    int ta, te, i = 0;
    while (!stop_bg) begin
      if (i % 2 == 0) do_read (p, 32'h0100_0000 * p + 32'(i) * 32'h40, 1 + (i * 37) % 200, ta, te);
      else            do_write(p, 32'h0100_0000 * p + 32'h8000 + 32'(i) * 32'h20, 1 + (i * 11) % 64, ta, te);
      i++;
    end
  endtask

  initial begin : main
    int ta, te, ta2, te2;
    int alone [16], busy [16];
    repeat (5) @(posedge clk);
    rst <= 1'b0;

    // 1. single transfer, burst length 1
    do_read(0, 32'h0000_0100, 1, ta, te);
    // 2. multiple transfers, burst length 1 (several per slot, then spill)
    for (int i = 0; i < 8; i++) do_read(1, 32'h0000_0200 + 32'(i) * 16, 1, ta, te);
    for (int i = 0; i < 6; i++) do_write(2, 32'h0000_0400 + 32'(i) * 16, 1, ta, te);
    // 4. multiple transfers, burst length 128: the second cannot fit after
    //    the first in the same window and must wait for the next slot
    do_write(0, 32'h0002_0000, 128, ta, te);
    do_read (0, 32'h0002_0000, 128, ta2, te2);
    if (slot_of(ta2) != slot_of(ta)) deferred++;
    check(slot_of(ta2) > slot_of(ta), "second 128-beat burst deferred to a later slot");
    // 5. burst length 256: fits a slot exactly
    do_write(1, 32'h0003_0000, 256, ta, te);
    check(slot_time_of(ta) <= 1, "256-beat write starts at the slot start");
    do_read (1, 32'h0003_0000, 256, ta, te);
    check(slot_time_of(ta) <= 1, "256-beat read starts at the slot start");
    // 3. slow DRAM is covered by the 20..57 cycle random latency throughout.

    // Isolation: the same port-0 pattern alone and under load.
    port0_pattern(alone);
    fork
      background(1);
      background(2);
      begin port0_pattern(busy); stop_bg = 1; end
    join
    for (int i = 0; i < 16; i++)
      check(alone[i] == busy[i], $sformatf("isolation: port-0 timing %0d: %0d vs %0d", i, alone[i], busy[i]));

    check(deferred > 0, "deferral happened");
    check(u_dram.n_reads > 10 && u_dram.n_writes > 10, "DRAM traffic seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
