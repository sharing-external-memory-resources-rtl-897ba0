// fta_time_slot_tracker: time base of the fixed time arbiter.
//
// The DRAM bus is handed to the arbiter's input ports in a fixed round:
// port 0, port 1, ..., port N_SLOTS-1, then port 0 again, whatever the
// ports are doing. Each slot lasts ALLOC_TIME + TIME_BUFFER clock cycles.
// During the first ALLOC_TIME cycles (the accept window) the selected port
// may start transfers; during the last TIME_BUFFER cycles it may not, so
// that a transfer started late in the window can still finish before the
// next port takes the bus.
//
// Outputs (registers or a compare on a register):
//   input_sel      index of the port that owns the current slot
//   slot_time      cycles elapsed since the slot began (0 on its first cycle)
//   accept_window  slot_time < ALLOC_TIME
//   slot_start     1 on the first cycle of every slot
// After reset the first slot (port 0) starts on the first cycle.
//
// The two lengths are generics, as described for the design; ALLOC_TIME's
// value of 258 (a 256-beat burst plus the two cycles needed to accept it) is
// this design's choice, TIME_BUFFER = 65 cycles is the measured worst-case
// DRAM latency plus a 15% margin.
module fta_time_slot_tracker #(
  parameter int unsigned N_SLOTS     = 3,
  parameter int unsigned ALLOC_TIME  = 258,
  parameter int unsigned TIME_BUFFER = 65,
  localparam int unsigned SLOT_LEN   = ALLOC_TIME + TIME_BUFFER,
  localparam int unsigned SEL_W      = (N_SLOTS > 1) ? $clog2(N_SLOTS) : 1,
  localparam int unsigned T_W        = $clog2(SLOT_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst,
  output logic [SEL_W-1:0] input_sel,
  output logic [T_W-1:0]   slot_time,
  output logic             accept_window,
  output logic             slot_start
);

  always_ff @(posedge clk) begin
    if (rst) begin
      input_sel <= '0;
      slot_time <= '0;
    end else if (slot_time == T_W'(SLOT_LEN - 1)) begin
      slot_time <= '0;
      input_sel <= (input_sel == SEL_W'(N_SLOTS - 1)) ? '0 : input_sel + 1'b1;
    end else begin
      slot_time <= slot_time + 1'b1;
    end
  end

  assign accept_window = (slot_time < T_W'(ALLOC_TIME));
  assign slot_start    = (slot_time == '0);

endmodule
