// tb_address_mapper: a throttling AXI4 manager drives the mapper (OFFSET =
// 0x1000, SIZE = 0x1000), whose manager side goes to a behavioural DRAM
// controller. Directed cases are the ones the design was validated with:
// plain reads and writes at offset addresses, 256-beat bursts filling the
// whole window, an unaligned address 0x5, 0xFF0 (last legal beat) against
// 0x1000 (first illegal), 0xFFFFF, and a 256-beat burst from 0xF00 that
// starts inside and ends outside. Then random transfers around the window
// edge. Checked: response codes (OKAY / DECERR on every beat and on b),
// read data (written data, or the DRAM model's initial pattern at the
// remapped address, which shows the offset), beat counts and last flags,
// one decode_error pulse per illegal transfer, no DRAM-side address outside
// [OFFSET, OFFSET+SIZE), and the number of transfers reaching the DRAM.
module tb_address_mapper;
  import mdp_pkg::*;
  localparam logic [ADDR_W-1:0] OFFSET = 32'h1000;
  localparam logic [ADDR_W:0]   SIZE   = 33'h1000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  axi_req_t  s_req, m_req;
  axi_resp_t s_resp, m_resp;
  logic      decode_error;
  int        n_reads, n_writes;

  axi_manager_bfm #(.THROTTLE(1'b1)) u_core (.clk, .req (s_req), .resp (s_resp));
  address_mapper #(.OFFSET(OFFSET), .SIZE(SIZE)) dut (
    .clk, .rst, .s_req, .s_resp, .m_req, .m_resp, .decode_error);
  dram_ctrl_model #(.MIN_LAT(3), .MAX_LAT(12), .READY_STALL(1'b1)) u_dram (
    .clk, .rst, .req (m_req), .resp (m_resp), .n_reads, .n_writes);

  int checks = 0, failures = 0;
  int n_err = 0, exp_err = 0, exp_rd = 0, exp_wr = 0;
  logic [DATA_W-1:0] shadow [int];   // core word address -> written data

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // DRAM side: every address must be remapped into the window
  always @(posedge clk) if (!rst) begin
    if (decode_error) n_err++;
    if (m_req.ar.valid && m_resp.ar_ready)
      check(m_req.ar.addr >= OFFSET && 33'(m_req.ar.addr) + ((33'(m_req.ar.len) + 1) << 4) <= 33'(OFFSET) + SIZE,
            $sformatf("ar %h outside the window", m_req.ar.addr));
    if (m_req.aw.valid && m_resp.aw_ready)
      check(m_req.aw.addr >= OFFSET && 33'(m_req.aw.addr) + ((33'(m_req.aw.len) + 1) << 4) <= 33'(OFFSET) + SIZE,
            $sformatf("aw %h outside the window", m_req.aw.addr));
  end

  function automatic bit legal(logic [ADDR_W-1:0] a, int len);
    return 64'(a) + 64'(len + 1) * 16 <= 64'(SIZE);
  endfunction

  task automatic do_read(input logic [ADDR_W-1:0] a, input int len);
    bit ok = legal(a, len);
    logic [ID_W-1:0] id = ID_W'($urandom());
    u_core.read(a, 8'(len), id);
    if (ok) exp_rd++; else exp_err++;
    for (int k = 0; k <= len; k++) begin
      logic [DATA_W-1:0] want;
      int wa = int'(a >> 4) + k;
      if (!ok) want = '0;
      else if (shadow.exists(wa)) want = shadow[wa];
      else want = {4{32'(28'(wa) + 28'(OFFSET >> 4)) ^ 32'h5A5A_0000}};
      check(u_core.rresp[k] == (ok ? RESP_OKAY : RESP_DECERR) && u_core.rdata[k] == want,
            $sformatf("read %h len %0d beat %0d: resp %0d data %h want %h", a, len, k,
                      u_core.rresp[k], u_core.rdata[k], want));
    end
  endtask

  task automatic do_write(input logic [ADDR_W-1:0] a, input int len);
    bit ok = legal(a, len);
    u_core.write(a, 8'(len), ID_W'($urandom()));
    if (ok) exp_wr++; else exp_err++;
    check(u_core.last_resp == (ok ? RESP_OKAY : RESP_DECERR),
          $sformatf("write %h len %0d: resp %0d", a, len, u_core.last_resp));
    if (ok) for (int k = 0; k <= len; k++) shadow[int'(a >> 4) + k] = u_core.wdata_of(a, k);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // directed cases
    do_read (32'h0, 0);
    do_write(32'h0, 0);
    do_read (32'h0, 0);
    do_write(32'h40, 3);
    do_read (32'h40, 3);
    do_read (32'h0, 255);           // whole window in one burst
    do_write(32'h0, 255);
    do_read (32'h0, 255);
    do_read (32'h5, 0);             // unaligned, inside
    do_read (32'hFF0, 0);           // last legal beat
    do_write(32'hFF0, 0);
    do_read (32'h1000, 0);          // first illegal
    do_write(32'h1000, 0);
    do_read (32'hFFFFF, 0);
    do_write(32'hFFFFF, 1);
    do_read (32'hF00, 255);         // starts inside, ends outside
    do_write(32'hF00, 255);
    do_read (32'hF00, 15);          // ends exactly at the edge: legal
    do_read (32'hFFFF_FFF0, 3);     // address wraps the 32-bit range
    // random transfers around the window edge
    for (int i = 0; i < 300; i++) begin
      logic [ADDR_W-1:0] a;
      int len;
      a   = ADDR_W'($urandom_range(32'h17F)) << 4;
      len = $urandom_range(3) == 0 ? $urandom_range(255) : $urandom_range(15);
      if ($urandom_range(1)) do_read(a, len); else do_write(a, len);
    end
    repeat (20) @(posedge clk);
    check(n_err == exp_err, $sformatf("decode errors %0d, want %0d", n_err, exp_err));
    check(n_reads == exp_rd && n_writes == exp_wr,
          $sformatf("DRAM saw %0d reads / %0d writes, want %0d / %0d", n_reads, n_writes, exp_rd, exp_wr));
    check(exp_err > 20 && exp_rd > 20 && exp_wr > 20,
          $sformatf("enough transfers: %0d illegal, %0d reads, %0d writes", exp_err, exp_rd, exp_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
