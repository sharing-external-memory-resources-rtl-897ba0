// tb_fta_time_slot_tracker: checks the slot counter against a reference
// count: input_sel steps 0,1,2,0,... every ALLOC_TIME + TIME_BUFFER cycles,
// slot_time runs 0..SLOT-1, accept_window is high for the first ALLOC_TIME
// cycles, slot_start on the first. Also a reset in mid-run restarts at
// port 0. Small sizes (N=3, 10 + 5) and the default sizes are both run.
module tb_fta_time_slot_tracker;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0] sel_s, sel_d;
  logic [3:0] t_s;
  logic [8:0] t_d;
  logic       win_s, win_d, start_s, start_d;

  fta_time_slot_tracker #(.N_SLOTS(3), .ALLOC_TIME(10), .TIME_BUFFER(5)) dut_s (
    .clk, .rst, .input_sel (sel_s), .slot_time (t_s), .accept_window (win_s), .slot_start (start_s));
  fta_time_slot_tracker dut_d (
    .clk, .rst, .input_sel (sel_d), .slot_time (t_d), .accept_window (win_d), .slot_start (start_d));

  int checks = 0, failures = 0;
  int n = 0;   // cycles since reset release

  always @(posedge clk) begin
    if (rst) n <= 0;
    else begin
      checks++;
      if (int'(sel_s) != (n / 15) % 3 || int'(t_s) != n % 15 ||
          win_s != (n % 15 < 10) || start_s != (n % 15 == 0)) begin
        failures++;
        $display("FAIL small n=%0d sel=%0d t=%0d", n, sel_s, t_s);
      end
      checks++;
      if (int'(sel_d) != (n / 323) % 3 || int'(t_d) != n % 323 ||
          win_d != (n % 323 < 258) || start_d != (n % 323 == 0)) begin
        failures++;
        $display("FAIL default n=%0d sel=%0d t=%0d", n, sel_d, t_d);
      end
      n <= n + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (1000) @(posedge clk);
    rst <= 1'b1;             // reset in mid-slot
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (2500) @(posedge clk);
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
