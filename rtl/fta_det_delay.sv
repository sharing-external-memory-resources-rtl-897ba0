// fta_det_delay: deterministic delay of one fixed-time-arbiter port.
//
// The DRAM and its controller answer after a latency that depends on what
// other cores did before (open rows, refresh, queued commands). This block
// hides that: read data and write responses coming back from the DRAM side
// are stored in FIFOs and handed to the core only once a fixed number of
// cycles has passed since the address handshake, so the latency the core
// sees depends only on its own burst length.
//
// Each channel has a counter and a release rule:
//   r: the counter starts at the ar handshake (cycle h) and stops when the
//      last read beat is handed to the core. Beats are released from cycle
//      h + DELAY on, one per cycle while the core is ready, so the last beat
//      of an L-beat burst reaches the core at h + DELAY + L - 1.
//   b: the counter starts at the aw handshake and stops when the write
//      response is handed to the core. The response is released at cycle
//      h + DELAY + L, L = awlen + 1, so the latency covers the data beats.
// The FIFO head is presented to the core only when the release condition
// holds (the "fifo enable" ANDed with the core's ready). The paper compares
// "counter bigger than delay"; here the counter is 1 on the cycle after the
// handshake and the compare is >=, which gives the cycle numbers above.
// Adding the burst length to the b delay is this design's choice.
//
// The DRAM-side ready of each channel is "FIFO not full". R_DEPTH = 256
// holds the longest AXI4 burst, so the DRAM side is never stalled by a slow
// core. busy is high from an address handshake until its response has been
// released; the channel controller waits on it before starting a new
// transfer.
module fta_det_delay #(
  parameter int unsigned DELAY   = 65,
  parameter int unsigned R_DEPTH = 256,
  parameter int unsigned B_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst,
  // address handshakes of this port
  input  logic              ar_hs,
  input  logic              aw_hs,
  input  logic [7:0]        aw_len,
  // DRAM side (from the AXI mux)
  input  mdp_pkg::axi_r_t   dram_r,
  output logic              dram_r_ready,
  input  mdp_pkg::axi_b_t   dram_b,
  output logic              dram_b_ready,
  // core side
  output mdp_pkg::axi_r_t   core_r,
  input  logic              core_r_ready,
  output mdp_pkg::axi_b_t   core_b,
  input  logic              core_b_ready,
  output logic              busy
);
  import mdp_pkg::*;

  localparam int unsigned CNT_W = 16;
  localparam int unsigned R_W   = ID_W + DATA_W + 2 + 1;
  localparam int unsigned B_W   = ID_W + 2;

  // ---------------- r channel ----------------
  logic [CNT_W-1:0] r_cnt;
  logic             r_en, r_fifo_en;
  logic [R_W-1:0]   r_head;
  logic             r_empty, r_full, r_pop, r_last_out;

  sync_fifo #(.WIDTH(R_W), .DEPTH(R_DEPTH)) u_r_fifo (
    .clk, .rst,
    .push    (dram_r.valid),
    .wr_data ({dram_r.id, dram_r.data, dram_r.resp, dram_r.last}),
    .pop     (r_pop),
    .rd_data (r_head),
    .empty   (r_empty),
    .full    (r_full),
    .count   ()
  );

  assign dram_r_ready = !r_full;
  assign r_fifo_en    = r_en && (r_cnt >= CNT_W'(DELAY));
  assign r_last_out   = r_head[0];

  always_comb begin
    core_r       = '0;
    core_r.valid = r_fifo_en && !r_empty;
    {core_r.id, core_r.data, core_r.resp, core_r.last} = r_head;
  end
  assign r_pop = core_r.valid && core_r_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_en  <= 1'b0;
      r_cnt <= '0;
    end else if (ar_hs) begin
      r_en  <= 1'b1;
      r_cnt <= CNT_W'(1);
    end else if (r_pop && r_last_out) begin
      r_en  <= 1'b0;
      r_cnt <= '0;
    end else if (r_en && r_cnt != '1) begin
      r_cnt <= r_cnt + 1'b1;
    end
  end

  // ---------------- b channel ----------------
  logic [CNT_W-1:0] b_cnt, b_target;
  logic             b_en, b_fifo_en;
  logic [B_W-1:0]   b_head;
  logic             b_empty, b_full, b_pop;

  sync_fifo #(.WIDTH(B_W), .DEPTH(B_DEPTH)) u_b_fifo (
    .clk, .rst,
    .push    (dram_b.valid),
    .wr_data ({dram_b.id, dram_b.resp}),
    .pop     (b_pop),
    .rd_data (b_head),
    .empty   (b_empty),
    .full    (b_full),
    .count   ()
  );

  assign dram_b_ready = !b_full;
  assign b_fifo_en    = b_en && (b_cnt >= b_target);

  always_comb begin
    core_b       = '0;
    core_b.valid = b_fifo_en && !b_empty;
    {core_b.id, core_b.resp} = b_head;
  end
  assign b_pop = core_b.valid && core_b_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      b_en     <= 1'b0;
      b_cnt    <= '0;
      b_target <= '0;
    end else if (aw_hs) begin
      b_en     <= 1'b1;
      b_cnt    <= CNT_W'(1);
      b_target <= CNT_W'(DELAY) + CNT_W'(aw_len) + CNT_W'(1);
    end else if (b_pop) begin
      b_en  <= 1'b0;
      b_cnt <= '0;
    end else if (b_en && b_cnt != '1) begin
      b_cnt <= b_cnt + 1'b1;
    end
  end

  assign busy = r_en || b_en;

endmodule
