// tb_fta_det_delay: checks the deterministic delay with DELAY = 20.
// Reads: after an ar handshake at cycle h, L beats are pushed in from the
// DRAM side after a random 2..DELAY-1 cycles with
// the core always ready, beat k must reach the core exactly at h+DELAY+k,
// with the right data and last flag. With the core randomly not ready, no
// beat may appear before h+DELAY and order and data must hold. Writes: the
// b response, pushed at a random time, must appear exactly at
// h + DELAY + awlen + 1. busy must be high from the handshake until the
// response has been taken.
module tb_fta_det_delay;
  import mdp_pkg::*;
  localparam int DELAY = 20;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic    ar_hs = 0, aw_hs = 0;
  logic [7:0] aw_len = 0;
  axi_r_t  dram_r = '0;
  axi_b_t  dram_b = '0;
  logic    dram_r_ready, dram_b_ready, core_r_ready = 1, core_b_ready = 1, busy;
  axi_r_t  core_r;
  axi_b_t  core_b;

  fta_det_delay #(.DELAY(DELAY), .R_DEPTH(256), .B_DEPTH(2)) dut (
    .clk, .rst, .ar_hs, .aw_hs, .aw_len, .dram_r, .dram_r_ready, .dram_b, .dram_b_ready,
    .core_r, .core_r_ready, .core_b, .core_b_ready, .busy);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic logic [DATA_W-1:0] beat_data(int t, int k);
    return {4{32'(t * 1000 + k)}};
  endfunction

  // one read: handshake, DRAM-side pushes, core-side checks
  task automatic one_read(input int t, input int len, input bit throttle);
    int h, got = 0;
    bit producer_done = 0;
    @(posedge clk); ar_hs <= 1; h = cyc + 1;
    @(posedge clk); ar_hs <= 0;
    fork
      begin : producer
        int lat = $urandom_range(DELAY - 1, 2);
        repeat (lat - 1) @(posedge clk);
        for (int k = 0; k < len; k++) begin
          dram_r <= '{id: 4'(t), data: beat_data(t, k), resp: RESP_OKAY, last: (k == len - 1), valid: 1'b1};
          do @(posedge clk); while (!dram_r_ready);
        end
        dram_r.valid <= 1'b0;
      end
      begin : consumer
        while (got < len) begin
          core_r_ready <= throttle ? 1'($urandom_range(1)) : 1'b1;
          @(posedge clk);
          check(busy, "busy while read pending");
          if (core_r.valid) check(cyc >= h + DELAY, "no beat before the delay");
          if (core_r.valid && core_r_ready) begin
            check(core_r.data == beat_data(t, got) && core_r.last == (got == len - 1),
                  $sformatf("beat %0d data/last", got));
            if (!throttle) check(cyc == h + DELAY + got,
                  $sformatf("beat %0d at %0d, want %0d", got, cyc - h, DELAY + got));
            got++;
          end
        end
        core_r_ready <= 1'b1;
      end
    join
    @(posedge clk);
    check(!busy, "busy released after last beat");
  endtask

  task automatic one_write(input int len);
    int h, seen = -1;
    @(posedge clk); aw_hs <= 1; aw_len <= 8'(len - 1); h = cyc + 1;
    @(posedge clk); aw_hs <= 0;
    fork
      begin
        repeat ($urandom_range(DELAY + len - 2, 1)) @(posedge clk);
        dram_b <= '{id: 4'(len), resp: RESP_OKAY, valid: 1'b1};
        @(posedge clk); dram_b.valid <= 1'b0;
      end
      begin
        while (seen < 0) begin
          @(posedge clk);
          if (core_b.valid && core_b_ready) seen = cyc;
        end
      end
    join
    check(seen == h + DELAY + len, $sformatf("b at +%0d, want +%0d", seen - h, DELAY + len));
    @(posedge clk);
    check(!busy, "busy released after b");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    one_read(1, 1, 0);
    one_read(2, 4, 0);
    one_read(3, 128, 0);
    one_read(4, 256, 0);
    for (int i = 0; i < 10; i++) one_read(10 + i, 1 + $urandom_range(40), 0);
    for (int i = 0; i < 5; i++)  one_read(30 + i, 1 + $urandom_range(60), 1);
    one_write(1);
    one_write(16);
    for (int i = 0; i < 8; i++) one_write(1 + $urandom_range(100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
