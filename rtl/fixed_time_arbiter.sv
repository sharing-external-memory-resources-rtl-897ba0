// fixed_time_arbiter: shares one AXI4 subordinate (the DRAM controller)
// between N_PORTS AXI4 managers without letting any manager observe, through
// bandwidth or latency, what the others do.
//
// Two mechanisms do this:
//  * Time slots. fta_time_slot_tracker gives the bus to the ports in a fixed
//    round, ALLOC_TIME + TIME_BUFFER cycles each, busy or not. A port's
//    fta_channel_ctrl starts a transfer only in the port's own slot and only
//    if the burst fits in the rest of the accept window, so the moment a
//    transfer starts depends only on the slot schedule and the port's own
//    traffic.
//  * Fixed latency. fta_det_delay buffers the r and b responses and releases
//    them DELAY cycles after the address handshake (plus the burst length
//    for writes), so the latency the core sees does not reveal the DRAM's
//    state. DELAY must be at least the DRAM's worst-case latency and
//    TIME_BUFFER at least DELAY.
// fta_axi_mux connects, combinationally, the one channel of the selected
// port that its controller's state allows.
//
// Interface: core_req/core_resp are the N_PORTS subordinate ports (one per
// manager); dram_req/dram_resp is the manager port towards the DRAM
// controller. One transfer per port is in flight at a time. All ports share
// clk and the synchronous, active-high rst.
//
// Timing of a transfer of L beats whose address handshake is at cycle h:
// the last read beat reaches the core at h + DELAY + L - 1, a write
// response at h + DELAY + L, provided the core is ready and the DRAM
// answered within DELAY cycles. Defaults: 65-cycle delay and time buffer
// (the measured 57-cycle worst case with a 15% margin); ALLOC_TIME = 258
// lets a 256-beat burst fit exactly in one slot (this design's choice of
// the exact number); N_PORTS = 3 (two cores and the row refresher).
module fixed_time_arbiter #(
  parameter int unsigned N_PORTS     = 3,
  parameter int unsigned ALLOC_TIME  = 258,
  parameter int unsigned TIME_BUFFER = 65,
  parameter int unsigned DELAY       = 65,
  parameter int unsigned R_DEPTH     = 256,
  localparam int unsigned SEL_W      = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned T_W        = $clog2(ALLOC_TIME + TIME_BUFFER + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  mdp_pkg::axi_req_t    core_req  [N_PORTS],
  output mdp_pkg::axi_resp_t   core_resp [N_PORTS],
  output mdp_pkg::axi_req_t    dram_req,
  input  mdp_pkg::axi_resp_t   dram_resp,
  output logic [SEL_W-1:0]     input_sel,
  output logic [T_W-1:0]       slot_time,
  output mdp_pkg::port_state_t port_state [N_PORTS]
);
  import mdp_pkg::*;

  axi_req_t    mux_req_vec  [N_PORTS];
  axi_resp_t   mux_resp_vec [N_PORTS];
  logic        accept_window, slot_start;

  fta_time_slot_tracker #(
    .N_SLOTS(N_PORTS), .ALLOC_TIME(ALLOC_TIME), .TIME_BUFFER(TIME_BUFFER)
  ) u_tracker (
    .clk, .rst, .input_sel, .slot_time, .accept_window, .slot_start
  );

  fta_axi_mux #(.N_PORTS(N_PORTS)) u_mux (
    .req_vector  (mux_req_vec),
    .resp_vector (mux_resp_vec),
    .req         (dram_req),
    .resp        (dram_resp),
    .state_vector(port_state),
    .input_sel
  );

  for (genvar i = 0; i < N_PORTS; i++) begin : g_port
    logic ar_hs, aw_hs, w_last_hs, b_hs, r_last_hs, busy;
    logic dram_r_ready, dram_b_ready;

    assign ar_hs     = core_req[i].ar.valid && mux_resp_vec[i].ar_ready;
    assign aw_hs     = core_req[i].aw.valid && mux_resp_vec[i].aw_ready;
    assign w_last_hs = core_req[i].w.valid && core_req[i].w.last && mux_resp_vec[i].w_ready;
    assign b_hs      = mux_resp_vec[i].b.valid && dram_b_ready;
    assign r_last_hs = mux_resp_vec[i].r.valid && mux_resp_vec[i].r.last && dram_r_ready;

    always_comb begin
      mux_req_vec[i]         = core_req[i];
      mux_req_vec[i].b_ready = dram_b_ready;
      mux_req_vec[i].r_ready = dram_r_ready;
    end

    fta_channel_ctrl #(
      .PORT_NR(i), .ALLOC_TIME(ALLOC_TIME), .SEL_W(SEL_W), .T_W(T_W)
    ) u_ctrl (
      .clk, .rst, .input_sel, .slot_time,
      .ar_valid (core_req[i].ar.valid), .ar_len (core_req[i].ar.len),
      .aw_valid (core_req[i].aw.valid), .aw_len (core_req[i].aw.len),
      .ar_hs, .aw_hs, .w_last_hs, .b_hs, .r_last_hs,
      .release_busy (busy),
      .state (port_state[i])
    );

    fta_det_delay #(.DELAY(DELAY), .R_DEPTH(R_DEPTH)) u_delay (
      .clk, .rst, .ar_hs, .aw_hs, .aw_len (core_req[i].aw.len),
      .dram_r (mux_resp_vec[i].r), .dram_r_ready,
      .dram_b (mux_resp_vec[i].b), .dram_b_ready,
      .core_r (core_resp[i].r), .core_r_ready (core_req[i].r_ready),
      .core_b (core_resp[i].b), .core_b_ready (core_req[i].b_ready),
      .busy
    );

    assign core_resp[i].aw_ready = mux_resp_vec[i].aw_ready;
    assign core_resp[i].w_ready  = mux_resp_vec[i].w_ready;
    assign core_resp[i].ar_ready = mux_resp_vec[i].ar_ready;
  end

  // Address channels towards the DRAM: once valid, the request is held
  // until accepted, as AXI4 requires.
  a_ar_stable: assert property (@(posedge clk) disable iff (rst)
    dram_req.ar.valid && !dram_resp.ar_ready |=> dram_req.ar.valid && $stable(dram_req.ar.addr));
  a_aw_stable: assert property (@(posedge clk) disable iff (rst)
    dram_req.aw.valid && !dram_resp.aw_ready |=> dram_req.aw.valid && $stable(dram_req.aw.addr));

endmodule
