// fta_axi_mux: combinational AXI4 multiplexer of the fixed time arbiter.
//
// input_sel (from the time slot tracker) picks one port; the state of that
// port's channel controller picks which of its channels is connected to the
// single AXI4 bus towards the DRAM controller:
//   ST_RD_ACCEPT -> ar       ST_RD_RESP -> r
//   ST_WR_ACCEPT -> aw       ST_WR_DATA -> w and b     ST_WR_RESP -> b
// Every other channel, of the selected port and of all other ports, sees an
// idle bus: valid and ready low, payload zero. Nothing here is clocked, so
// the signals on both sides must come from and go to registers or FIFOs.
// The connection rule follows the published design; like it, the mux does
// not check that a transfer finished before the slot moved on: the slot's
// time buffer has to make sure of that.
module fta_axi_mux #(
  parameter int unsigned N_PORTS = 3,
  localparam int unsigned SEL_W  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  mdp_pkg::axi_req_t    req_vector   [N_PORTS],
  output mdp_pkg::axi_resp_t   resp_vector  [N_PORTS],
  output mdp_pkg::axi_req_t    req,
  input  mdp_pkg::axi_resp_t   resp,
  input  mdp_pkg::port_state_t state_vector [N_PORTS],
  input  logic [SEL_W-1:0]     input_sel
);
  import mdp_pkg::*;

  port_state_t sel_state;
  axi_req_t    sel_req;

  always_comb begin
    sel_state = ST_IDLE;
    sel_req   = AXI_REQ_IDLE;
    for (int i = 0; i < N_PORTS; i++) begin
      if (input_sel == SEL_W'(i)) begin
        sel_state = state_vector[i];
        sel_req   = req_vector[i];
      end
    end
  end

  always_comb begin
    req = AXI_REQ_IDLE;
    if (sel_state == ST_RD_ACCEPT) req.ar = sel_req.ar;
    if (sel_state == ST_WR_ACCEPT) req.aw = sel_req.aw;
    if (sel_state == ST_RD_RESP)   req.r_ready = sel_req.r_ready;
    if (sel_state == ST_WR_DATA)   req.w = sel_req.w;
    if (sel_state == ST_WR_DATA || sel_state == ST_WR_RESP)
      req.b_ready = sel_req.b_ready;
  end

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      resp_vector[i] = AXI_RESP_IDLE;
      if (input_sel == SEL_W'(i)) begin
        if (state_vector[i] == ST_RD_ACCEPT) resp_vector[i].ar_ready = resp.ar_ready;
        if (state_vector[i] == ST_WR_ACCEPT) resp_vector[i].aw_ready = resp.aw_ready;
        if (state_vector[i] == ST_RD_RESP)   resp_vector[i].r        = resp.r;
        if (state_vector[i] == ST_WR_DATA)   resp_vector[i].w_ready  = resp.w_ready;
        if (state_vector[i] == ST_WR_DATA || state_vector[i] == ST_WR_RESP)
          resp_vector[i].b = resp.b;
      end
    end
  end

endmodule
