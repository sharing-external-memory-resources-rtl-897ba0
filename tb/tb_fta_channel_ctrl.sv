// tb_fta_channel_ctrl: directed test of the channel controller FSM
// (PORT_NR = 1, ALLOC_TIME = 258). Checks, state by state: no start outside
// the port's slot, no start while the previous response is still held,
// the fit rule at its exact boundary (slot_time + len + 3 <= ALLOC_TIME),
// the read path idle -> rd_accept -> rd_resp -> release -> idle, the write
// path through wr_accept, wr_data and wr_resp, and read/write alternation.
module tb_fta_channel_ctrl;
  import mdp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0] input_sel;
  logic [8:0] slot_time;
  logic       ar_valid, aw_valid, ar_hs, aw_hs, w_last_hs, b_hs, r_last_hs, busy;
  logic [7:0] ar_len, aw_len;
  port_state_t state;

  fta_channel_ctrl #(.PORT_NR(1), .ALLOC_TIME(258), .SEL_W(2), .T_W(9)) dut (
    .clk, .rst, .input_sel, .slot_time, .ar_valid, .ar_len, .aw_valid, .aw_len,
    .ar_hs, .aw_hs, .w_last_hs, .b_hs, .r_last_hs, .release_busy (busy), .state);

  int checks = 0, failures = 0;

  task automatic clear();
    input_sel = 0; slot_time = 0; ar_valid = 0; aw_valid = 0; ar_len = 0; aw_len = 0;
    ar_hs = 0; aw_hs = 0; w_last_hs = 0; b_hs = 0; r_last_hs = 0; busy = 0;
  endtask

  // apply the current inputs for one clock, then check the new state
  task automatic step(input port_state_t want, input string what);
    @(posedge clk); #1;
    checks++;
    if (state !== want) begin
      failures++;
      $display("FAIL %s: state %s, want %s", what, state.name(), want.name());
    end
  endtask

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst = 0; #1;

    // not our slot
    input_sel = 0; ar_valid = 1; ar_len = 0; slot_time = 5;
    step(ST_IDLE, "other port's slot");
    // our slot, previous response still held
    input_sel = 1; busy = 1;
    step(ST_IDLE, "release busy");
    busy = 0;
    // does not fit: 200 + 255 + 3 > 258
    ar_len = 255; slot_time = 200;
    step(ST_IDLE, "burst does not fit");
    // exact boundary: 2 + 253 + 3 == 258 fits, 3 + 253 + 3 does not
    ar_len = 253; slot_time = 3;
    step(ST_IDLE, "one cycle too late");
    slot_time = 2;
    step(ST_RD_ACCEPT, "exact fit accepted");
    // read path
    slot_time = 3;
    step(ST_RD_ACCEPT, "wait for ar handshake");
    ar_hs = 1;
    step(ST_RD_RESP, "ar handshake");
    ar_hs = 0; ar_valid = 0;
    step(ST_RD_RESP, "wait for last beat");
    r_last_hs = 1; busy = 1;
    step(ST_RELEASE, "last read beat");
    r_last_hs = 0;
    step(ST_RELEASE, "response held");
    busy = 0;
    step(ST_IDLE, "response released");
    // write path
    aw_valid = 1; aw_len = 7; slot_time = 100;
    step(ST_WR_ACCEPT, "write accepted");
    aw_hs = 1;
    step(ST_WR_DATA, "aw handshake");
    aw_hs = 0; aw_valid = 0;
    step(ST_WR_DATA, "wait for last beat");
    w_last_hs = 1;
    step(ST_WR_RESP, "last write beat");
    w_last_hs = 0; busy = 1;
    step(ST_WR_RESP, "wait for b");
    b_hs = 1;
    step(ST_RELEASE, "b handshake");
    b_hs = 0; busy = 0;
    step(ST_IDLE, "write released");
    // both pending: last was a write, so read goes first, then write
    ar_valid = 1; aw_valid = 1; ar_len = 0; aw_len = 0;
    step(ST_RD_ACCEPT, "alternation: read after write");
    ar_hs = 1; step(ST_RD_RESP, "ar");
    ar_hs = 0; r_last_hs = 1; step(ST_RELEASE, "r last");
    r_last_hs = 0; step(ST_IDLE, "released");
    step(ST_WR_ACCEPT, "alternation: write after read");
    // reset returns to idle
    rst = 1; step(ST_IDLE, "reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
