// row_refresher: rowhammer protection by targeted refreshes.
//
// The block watches the AXI4 bus between the fixed time arbiter and the DRAM
// controller. Every accepted read or write address (an ar or aw handshake)
// is an activation of one DRAM row, and the block keeps a counter per row in
// a two-port block RAM (rh_count_ram). When a row has been accessed
// THRESHOLD times, its counter returns to zero and the two physically
// adjacent rows are refreshed by reading them: an AXI4 single-beat read
// opens (activates) a row and so restores the charge of its cells.
//
// Two tracking modes, chosen with TRACK_BANKS:
//   1: one counter per (bank, row), 2**17 counters; a hit refreshes row-1
//      and row+1 in that bank (2 reads).
//   0: one counter per row number, 2**14 counters, banks not told apart; a
//      hit refreshes row-1 and row+1 in all 8 banks (16 reads). This is the
//      default: it needs an eighth of the block RAM.
// The row and bank are taken from the byte address: column [10:0], row
// [24:11], bank [27:25].
//
// Tracker pipeline (one access per cycle):
//   stage 1  access seen on the bus -> read its counter (port a)
//   stage 2  counter + 1; if it reaches THRESHOLD write 0, else write the
//            new count (port b); a write to the same counter on the previous
//            edge is forwarded, as the read-first RAM still returns the old
//            word then
//   stage 3  a hit enters the refresh queue (QUEUE_DEPTH events); the
//            request generator turns each event into 2 or 16 AXI4 reads on
//            its own manager port, to be scheduled in the refresher's
//            arbiter time slot. Read data are discarded.
// The refresh reads are themselves seen on the bus and counted, as they are
// activations too. Many rows primed just below the threshold can hit faster
// than their refreshes drain, so a hit is taken only when the queue has room;
// otherwise its counter is parked at THRESHOLD - 1 and the row's next access
// hits again, and the sticky `overflow` output records that a refresh had to
// wait. No hit is ever dropped. (The queue, its depth, this back-pressure and
// the forwarding are this design's choices, not specified by the published
// design, which also leaves the row-0 / last-row edge open: here row-1 and
// row+1 wrap around the row range.)
// Outputs: refresh_event pulses in stage 3 for each hit; refresh_reads
// counts the refresh reads accepted by the arbiter.
module row_refresher #(
  parameter bit          TRACK_BANKS = 1'b0,
  parameter int unsigned THRESHOLD   = 5000,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned QUEUE_DEPTH = 4,
  parameter logic [mdp_pkg::ID_W-1:0] AXI_ID = '0
) (
  input  logic               clk,
  input  logic               rst,
  // monitored bus (arbiter -> DRAM controller)
  input  mdp_pkg::axi_req_t  mon_req,
  input  mdp_pkg::axi_resp_t mon_resp,
  // own manager port (towards the arbiter)
  output mdp_pkg::axi_req_t  m_req,
  input  mdp_pkg::axi_resp_t m_resp,
  // status
  output logic               refresh_event,
  output logic [31:0]        refresh_reads,
  output logic               overflow
);
  import mdp_pkg::*;

  localparam int unsigned IDX_W = TRACK_BANKS ? (BANK_W + ROW_W) : ROW_W;
  localparam int unsigned N_REQ = TRACK_BANKS ? 2 : 2 * N_BANKS;
  localparam int unsigned K_W   = $clog2(N_REQ);

  typedef struct packed {
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
  } row_addr_t;

  function automatic logic [IDX_W-1:0] counter_index(row_addr_t ra);
    if (TRACK_BANKS) return IDX_W'({ra.bank, ra.row});
    else             return IDX_W'(ra.row);
  endfunction

  // ---------------- stage 1 ----------------
  logic          acc_valid;
  logic [ADDR_W-1:0] acc_addr;
  row_addr_t     acc_ra;

  assign acc_valid = (mon_req.ar.valid && mon_resp.ar_ready) ||
                     (mon_req.aw.valid && mon_resp.aw_ready);
  assign acc_addr  = (mon_req.ar.valid && mon_resp.ar_ready) ? mon_req.ar.addr : mon_req.aw.addr;
  assign acc_ra    = '{bank: acc_addr[BANK_LSB +: BANK_W], row: acc_addr[ROW_LSB +: ROW_W]};

  logic              s2_valid;
  row_addr_t         s2_ra;
  logic [IDX_W-1:0]  s2_idx;
  logic [CNT_W-1:0]  ram_dout, s2_new;

  rh_count_ram #(.ADDR_W(IDX_W), .DATA_W(CNT_W)) u_ram (
    .clk,
    .a_en   (acc_valid),
    .a_addr (counter_index(acc_ra)),
    .a_dout (ram_dout),
    .b_en   (s2_valid),
    .b_addr (s2_idx),
    .b_din  (s2_new)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid <= 1'b0;
      s2_ra    <= '0;
      s2_idx   <= '0;
    end else begin
      s2_valid <= acc_valid;
      if (acc_valid) begin
        s2_ra  <= acc_ra;
        s2_idx <= counter_index(acc_ra);
      end
    end
  end

  // ---------------- stage 2 ----------------
  localparam int unsigned PTR_W = (QUEUE_DEPTH > 1) ? $clog2(QUEUE_DEPTH) : 1;
  logic      s3_valid;
  row_addr_t s3_ra;
  logic             wq_valid;
  logic [IDX_W-1:0] wq_idx;
  logic [CNT_W-1:0] wq_data;
  logic [CNT_W-1:0] s2_cnt;
  logic             s2_hit;

  logic             s2_room;
  logic [PTR_W:0]   q_count;

  // A hit is taken only if the queue is sure to have room for it on the
  // next edge (entries held plus the one being pushed now). Otherwise the
  // counter is parked at THRESHOLD - 1, so the next access of that row hits
  // again: a hit can be delayed but is never lost.
  always_comb begin
    s2_cnt  = (wq_valid && wq_idx == s2_idx) ? wq_data : ram_dout;
    s2_hit  = (32'(s2_cnt) + 32'd1) >= THRESHOLD;
    s2_room = (32'(q_count) + 32'(s3_valid)) < QUEUE_DEPTH;
    if (!s2_hit)      s2_new = s2_cnt + 1'b1;
    else if (s2_room) s2_new = '0;
    else              s2_new = CNT_W'(THRESHOLD - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wq_valid <= 1'b0;
      wq_idx   <= '0;
      wq_data  <= '0;
      s3_valid <= 1'b0;
      s3_ra    <= '0;
    end else begin
      wq_valid <= s2_valid;
      wq_idx   <= s2_idx;
      wq_data  <= s2_new;
      s3_valid <= s2_valid && s2_hit && s2_room;
      s3_ra    <= s2_ra;
    end
  end

  // ---------------- stage 3: refresh queue ----------------
  logic      q_empty, q_full, q_pop;
  row_addr_t q_head;

  sync_fifo #(.WIDTH($bits(row_addr_t)), .DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst,
    .push    (s3_valid),
    .wr_data (s3_ra),
    .pop     (q_pop),
    .rd_data (q_head),
    .empty   (q_empty),
    .full    (q_full),
    .count   (q_count)
  );

  assign refresh_event = s3_valid;

  always_ff @(posedge clk) begin
    if (rst)                                       overflow <= 1'b0;
    else if (s2_valid && s2_hit && !s2_room)       overflow <= 1'b1;
  end

  // ---------------- refresh read generator ----------------
  logic [K_W-1:0]    k;
  logic [ROW_W-1:0]  nb_row;
  logic [BANK_W-1:0] nb_bank;
  logic              ar_hs;

  always_comb begin
    nb_row  = k[0] ? q_head.row + 1'b1 : q_head.row - 1'b1;
    nb_bank = TRACK_BANKS ? q_head.bank : BANK_W'(k >> 1);
    m_req            = AXI_REQ_IDLE;
    m_req.ar.valid   = !q_empty;
    m_req.ar.id      = AXI_ID;
    m_req.ar.addr    = ADDR_W'({nb_bank, nb_row, {COL_W{1'b0}}});
    m_req.ar.len     = 8'd0;
    m_req.ar.size    = BEAT_SIZE;
    m_req.ar.burst   = BURST_INCR;
    m_req.r_ready    = 1'b1;
    m_req.b_ready    = 1'b1;
  end

  assign ar_hs = m_req.ar.valid && m_resp.ar_ready;
  assign q_pop = ar_hs && (k == K_W'(N_REQ - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      k             <= '0;
      refresh_reads <= '0;
    end else if (ar_hs) begin
      k             <= (k == K_W'(N_REQ - 1)) ? '0 : k + 1'b1;
      refresh_reads <= refresh_reads + 1'b1;
    end
  end

  // The room check above keeps the queue from ever being pushed when full.
  a_no_lost_hit: assert property (@(posedge clk) disable iff (rst) s3_valid |-> !q_full);

  // The monitored bus carries at most one address handshake per cycle
  // (the arbiter connects one channel at a time).
  a_one_access: assert property (@(posedge clk) disable iff (rst)
    !(mon_req.ar.valid && mon_resp.ar_ready && mon_req.aw.valid && mon_resp.aw_ready));

endmodule
