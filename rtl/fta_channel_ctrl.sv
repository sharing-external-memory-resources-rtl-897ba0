// fta_channel_ctrl: AXI4 channel controller of one fixed-time-arbiter port.
//
// Each input port of the arbiter has one. Its state tells the AXI mux which
// single channel of this port may be connected to the DRAM bus:
//   ST_IDLE       nothing connected. When the tracker selects this port
//                 (input_sel == PORT_NR), the previous transfer of the port
//                 has been delivered to the core (release_busy low) and a
//                 read or write request is waiting, the controller checks
//                 that the burst fits in what is left of the accept window:
//                     slot_time + (len + 1) + 2 <= ALLOC_TIME
//                 (one cycle to enter the accept state, one for the address
//                 handshake). A request that does not fit waits for the
//                 port's next slot.
//   ST_RD_ACCEPT  ar connected, until the ar handshake
//   ST_RD_RESP    r connected (into the delay FIFO) until the last beat
//   ST_WR_ACCEPT  aw connected, until the aw handshake
//   ST_WR_DATA    w (and b) connected until the last write beat
//   ST_WR_RESP    b connected until the write response
//   ST_RELEASE    the DRAM side is done; the controller waits until the
//                 deterministic delay has handed the response to the core.
// The first six states and their transitions follow the published design;
// ST_RELEASE is this design's reading of the seventh state, and it makes
// sure a port never has more than one transfer in flight. When a read and a
// write request are both waiting, the controller alternates between them
// (this design's choice).
//
// Handshake inputs are the handshakes seen on the mux side of this port.
module fta_channel_ctrl #(
  parameter int unsigned PORT_NR    = 0,
  parameter int unsigned ALLOC_TIME = 258,
  parameter int unsigned SEL_W      = 2,
  parameter int unsigned T_W        = 9
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [SEL_W-1:0]   input_sel,
  input  logic [T_W-1:0]     slot_time,
  input  logic               ar_valid,
  input  logic [7:0]         ar_len,
  input  logic               aw_valid,
  input  logic [7:0]         aw_len,
  input  logic               ar_hs,
  input  logic               aw_hs,
  input  logic               w_last_hs,
  input  logic               b_hs,
  input  logic               r_last_hs,
  input  logic               release_busy,
  output mdp_pkg::port_state_t state
);
  import mdp_pkg::*;

  port_state_t state_d;
  logic        prefer_wr;  // the last accepted transfer was a read
  logic        rd_fits, wr_fits, selected;

  assign selected = (input_sel == SEL_W'(PORT_NR));
  assign rd_fits  = (32'(slot_time) + 32'(ar_len) + 32'd3) <= ALLOC_TIME;
  assign wr_fits  = (32'(slot_time) + 32'(aw_len) + 32'd3) <= ALLOC_TIME;

  always_comb begin
    state_d = state;
    unique case (state)
      ST_IDLE: begin
        if (selected && !release_busy) begin
          if (ar_valid && rd_fits && (!prefer_wr || !aw_valid || !wr_fits))
            state_d = ST_RD_ACCEPT;
          else if (aw_valid && wr_fits)
            state_d = ST_WR_ACCEPT;
        end
      end
      ST_RD_ACCEPT: if (ar_hs)     state_d = ST_RD_RESP;
      ST_RD_RESP:   if (r_last_hs) state_d = ST_RELEASE;
      ST_WR_ACCEPT: if (aw_hs)     state_d = ST_WR_DATA;
      ST_WR_DATA:   if (w_last_hs) state_d = ST_WR_RESP;
      ST_WR_RESP:   if (b_hs)      state_d = ST_RELEASE;
      ST_RELEASE:   if (!release_busy) state_d = ST_IDLE;
      default:      state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_IDLE;
      prefer_wr <= 1'b0;
    end else begin
      state <= state_d;
      if (state == ST_IDLE && state_d == ST_RD_ACCEPT) prefer_wr <= 1'b1;
      if (state == ST_IDLE && state_d == ST_WR_ACCEPT) prefer_wr <= 1'b0;
    end
  end

endmodule
