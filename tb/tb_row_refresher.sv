// tb_row_refresher: checks both tracking modes side by side with
// THRESHOLD = 8. Accesses (ar or aw handshakes, single cycles or back to
// back on one row, to exercise the RAM forwarding) are driven onto the
// monitored bus; a reference model counts per row (mode 0) or per bank and
// row (mode 1) and predicts every refresh read: row-1 and row+1 in all 8
// banks (16 reads) or in the accessed bank (2 reads), in that order. The
// refresh reads each DUT issues are compared with the prediction, as are
// the number of threshold hits. A last phase hammers one row every cycle,
// faster than the 16 refresh reads per hit of mode 0 can drain: mode 0 must
// flag that refreshes had to wait, still issue 16 reads for every hit it
// reports, and keep hitting (none lost); mode 1 (2 reads per hit) keeps up
// and is still checked read by read against the model.
module tb_row_refresher;
  import mdp_pkg::*;
  localparam int THR = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  axi_req_t  mon_req;
  axi_resp_t mon_resp;
  logic      mon_ar_v = 0, mon_aw_v = 0, mon_ready = 0;
  logic [ADDR_W-1:0] mon_addr = '0;
  always_comb begin
    mon_req  = '0;
    mon_resp = '0;
    mon_req.ar.valid   = mon_ar_v;
    mon_req.ar.addr    = mon_addr;
    mon_req.aw.valid   = mon_aw_v;
    mon_req.aw.addr    = mon_addr;
    mon_resp.ar_ready  = mon_ready;
    mon_resp.aw_ready  = mon_ready;
  end
  axi_req_t  m_req0, m_req1;
  axi_resp_t m_resp0 = '0, m_resp1 = '0;
  logic      ev0, ev1, ovf0, ovf1;
  logic [31:0] nrd0, nrd1;

  row_refresher #(.TRACK_BANKS(1'b0), .THRESHOLD(THR), .QUEUE_DEPTH(4)) dut0 (
    .clk, .rst, .mon_req, .mon_resp, .m_req (m_req0), .m_resp (m_resp0),
    .refresh_event (ev0), .refresh_reads (nrd0), .overflow (ovf0));
  row_refresher #(.TRACK_BANKS(1'b1), .THRESHOLD(THR), .QUEUE_DEPTH(4)) dut1 (
    .clk, .rst, .mon_req, .mon_resp, .m_req (m_req1), .m_resp (m_resp1),
    .refresh_event (ev1), .refresh_reads (nrd1), .overflow (ovf1));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference model
  int cnt0 [int], cnt1 [int];
  logic [ADDR_W-1:0] exp0 [$], exp1 [$];
  int hits0 = 0, hits1 = 0, evs0 = 0, evs1 = 0;
  bit checking = 1;
  int mark0, mark1;

  function automatic logic [ADDR_W-1:0] mk(int bank, int row);
    return ADDR_W'({3'(bank), 14'(row), 11'd0});
  endfunction

  function automatic void model_access(int bank, int row);
    int i1 = bank * 16384 + row;
    if (!cnt0.exists(row)) cnt0[row] = 0;
    if (!cnt1.exists(i1))  cnt1[i1] = 0;
    cnt0[row]++;
    if (cnt0[row] == THR) begin
      cnt0[row] = 0; hits0++;
      for (int b = 0; b < 8; b++) begin
        exp0.push_back(mk(b, (row + 16383) % 16384));
        exp0.push_back(mk(b, (row + 1) % 16384));
      end
    end
    cnt1[i1]++;
    if (cnt1[i1] == THR) begin
      cnt1[i1] = 0; hits1++;
      exp1.push_back(mk(bank, (row + 16383) % 16384));
      exp1.push_back(mk(bank, (row + 1) % 16384));
    end
  endfunction

  // collect refresh reads
  always @(posedge clk) if (!rst) begin
    if (ev0) evs0++;
    if (ev1) evs1++;
    if (checking && m_req0.ar.valid && m_resp0.ar_ready) begin
      check(exp0.size() > 0 && m_req0.ar.addr == exp0[0],
            $sformatf("mode 0 refresh addr %h want %h", m_req0.ar.addr, exp0.size() ? exp0[0] : 0));
      check(m_req0.ar.len == 0 && m_req0.r_ready, "mode 0 single-beat read");
      if (exp0.size() > 0) void'(exp0.pop_front());
    end
    if (m_req1.ar.valid && m_resp1.ar_ready) begin
      check(exp1.size() > 0 && m_req1.ar.addr == exp1[0],
            $sformatf("mode 1 refresh addr %h", m_req1.ar.addr));
      if (exp1.size() > 0) void'(exp1.pop_front());
    end
  end

  always @(posedge clk) begin
    m_resp0.ar_ready <= 1'b1;
    m_resp1.ar_ready <= 1'($urandom_range(1));
  end

  task automatic access(input int bank, input int row, input bit write);
    logic [ADDR_W-1:0] a = mk(bank, row) | ADDR_W'($urandom_range(2047));
    // blocking drive just after the edge: back-to-back calls must not
    // depend on the order of non-blocking updates
    #1 mon_ar_v = !write; mon_aw_v = write; mon_addr = a; mon_ready = 1'b1;
    @(posedge clk);
    #1 mon_ar_v = 1'b0; mon_aw_v = 1'b0;
    model_access(bank, row);
  endtask

  initial begin
    int rows [4] = '{100, 101, 0, 16383};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // valid without ready is not an access
    #1 mon_ar_v = 1'b1; mon_ready = 1'b0;
    @(posedge clk); #1 mon_ar_v = 1'b0;
    // back-to-back accesses of one row (forwarding path), paced
    for (int i = 0; i < 3 * THR; i++) begin
      access(2, 500, i[0]);
      if (i % THR == THR - 1) repeat (20) @(posedge clk);
    end
    // random rows, banks, read/write, with idle gaps
    for (int i = 0; i < 400; i++) begin
      access($urandom_range(7), rows[$urandom_range(3)], $urandom_range(1));
      repeat ($urandom_range(4, 1)) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    check(exp0.size() == 0 && exp1.size() == 0,
          $sformatf("all predicted refreshes issued (left %0d / %0d)", exp0.size(), exp1.size()));
    check(evs0 == hits0 && evs1 == hits1,
          $sformatf("threshold hits %0d/%0d, want %0d/%0d", evs0, evs1, hits0, hits1));
    check(int'(nrd0) == 16 * hits0 && int'(nrd1) == 2 * hits1, "refresh read counts");
    check(hits0 > 5 && hits1 > 5, "enough threshold hits");
    check(!ovf0 && !ovf1, "no overflow while paced");
    // hammer one row every cycle: mode 0 needs 16 reads per 8 accesses
    checking = 0;
    mark0 = evs0;
    for (int i = 0; i < 40 * THR; i++) access(1, 7, 0);
    repeat (5) @(posedge clk);
    check(ovf0, "mode 0 flags refreshes that had to wait");
    check(!ovf1, "mode 1 keeps up");
    mark1 = evs0;
    // keep hammering slowly: the parked counter must hit again at once
    for (int i = 0; i < 4 * THR; i++) begin
      access(1, 7, 0);
      repeat (40) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    check(evs0 - mark1 >= 4, $sformatf("mode 0 hits resume after back-pressure: %0d", evs0 - mark1));
    check(evs0 - mark0 >= 40 * THR / 17, $sformatf("mode 0 hits while hammered: %0d", evs0 - mark0));
    check(int'(nrd0) == 16 * evs0, $sformatf("mode 0: 16 reads per reported hit (%0d for %0d)", nrd0, evs0));
    check(exp1.size() == 0 && evs1 == hits1, "mode 1 matches the model through the hammer phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
