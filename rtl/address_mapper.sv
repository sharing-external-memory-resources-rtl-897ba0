// address_mapper: confines one core to its own window of the shared DRAM.
//
// Sits between a core (AXI4 subordinate port s_*) and the arbiter (AXI4
// manager port m_*). Each transfer's address range, computed as an
// incrementing burst from addr to addr + (len+1) * 2**size - 1, is checked
// against the window size SIZE. A transfer that lies wholly inside is
// forwarded with OFFSET added to its address; any other transfer never
// reaches the DRAM side and is answered with DECERR. Fixed and wrapping
// bursts are checked as if they were incrementing, which never lets an
// out-of-window access through but may reject a few legal ones.
//
// One controller per AXI4 channel:
//   aw/ar  address check: accepts an address when its output register is
//          free, forwards legal ones (registered, one cycle) and after an
//          illegal one accepts nothing more until its error response has
//          been given (error_resp_done).
//   w      a token per accepted write address (legal or not) says what to
//          do with the next write burst: pass it on, or take it from the
//          core and drop it.
//   b      passes responses of legal writes; once the dropped burst has been
//          taken and every earlier legal write has been answered, it gives
//          the core one DECERR response with the illegal transfer's ID.
//   r      passes read data of legal reads; once every earlier legal read
//          has finished, it gives the core len+1 DECERR beats (data zero,
//          last on the final one) for the illegal read.
// The structure (address check shared by the check of aw and ar, one
// controller per channel, error_resp_done hand-back, earlier transfers
// finished before the error) follows the published design; the token FIFO,
// counters of outstanding transfers and the single-register address stage
// are this design's choices. Added latency: one cycle on ar and aw, none on
// w, r and b.
// Defaults OFFSET = 0x1000 and SIZE = 0x1000 are the values the design was
// validated with; the memory domain protector sets its own per core.
module address_mapper #(
  parameter logic [mdp_pkg::ADDR_W-1:0] OFFSET   = 32'h0000_1000,
  parameter logic [mdp_pkg::ADDR_W:0]   SIZE     = 33'h0_0000_1000,
  parameter int unsigned                W_TOKENS = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  mdp_pkg::axi_req_t  s_req,
  output mdp_pkg::axi_resp_t s_resp,
  output mdp_pkg::axi_req_t  m_req,
  input  mdp_pkg::axi_resp_t m_resp,
  output logic               decode_error   // pulse: an illegal address was accepted
);
  import mdp_pkg::*;

  localparam int unsigned OUT_W = 8;

  function automatic logic in_window(axi_addr_t a);
    logic [ADDR_W+1:0] last_excl;
    last_excl = (ADDR_W+2)'(a.addr) + (((ADDR_W+2)'(a.len) + 1'b1) << a.size);
    return last_excl <= (ADDR_W+2)'(SIZE);
  endfunction

  function automatic axi_addr_t remap(axi_addr_t a);
    axi_addr_t r = a;
    r.addr = a.addr + OFFSET;
    return r;
  endfunction

  // ---------------- aw address check ----------------
  axi_addr_t        aw_q;
  logic             aw_err_pend, w_err_done;
  logic [ID_W-1:0]  b_err_id;
  logic [OUT_W-1:0] wr_out;           // legal writes not yet answered
  logic             s_aw_hs, aw_legal;
  logic             tok_full, tok_empty, tok_head, tok_pop;

  assign aw_legal        = in_window(s_req.aw);
  assign s_resp.aw_ready = !aw_q.valid && !aw_err_pend && !tok_full;
  assign s_aw_hs         = s_req.aw.valid && s_resp.aw_ready;

  sync_fifo #(.WIDTH(1), .DEPTH(W_TOKENS)) u_w_tokens (
    .clk, .rst,
    .push    (s_aw_hs),
    .wr_data (aw_legal),
    .pop     (tok_pop),
    .rd_data (tok_head),
    .empty   (tok_empty),
    .full    (tok_full),
    .count   ()
  );

  // ---------------- w channel ----------------
  logic s_w_hs;
  always_comb begin
    m_req.aw       = aw_q;
    m_req.w        = s_req.w;
    m_req.w.valid  = s_req.w.valid && !tok_empty && tok_head;
    s_resp.w_ready = !tok_empty && (tok_head ? m_resp.w_ready : 1'b1);
  end
  assign s_w_hs  = s_req.w.valid && s_resp.w_ready;
  assign tok_pop = s_w_hs && s_req.w.last;

  // ---------------- b channel ----------------
  logic err_b_active, s_b_hs;
  assign err_b_active = aw_err_pend && w_err_done && (wr_out == '0);
  always_comb begin
    if (err_b_active) begin
      s_resp.b       = '{id: b_err_id, resp: RESP_DECERR, valid: 1'b1};
      m_req.b_ready  = 1'b0;
    end else begin
      s_resp.b       = m_resp.b;
      m_req.b_ready  = s_req.b_ready;
    end
  end
  assign s_b_hs = s_resp.b.valid && s_req.b_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      aw_q        <= '0;
      aw_err_pend <= 1'b0;
      w_err_done  <= 1'b0;
      b_err_id    <= '0;
      wr_out      <= '0;
    end else begin
      if (aw_q.valid && m_resp.aw_ready) aw_q.valid <= 1'b0;
      if (s_aw_hs) begin
        if (aw_legal) aw_q <= remap(s_req.aw);
        else begin
          aw_err_pend <= 1'b1;
          b_err_id    <= s_req.aw.id;
        end
      end
      if (tok_pop && !tok_head) w_err_done <= 1'b1;
      if (s_b_hs && err_b_active) begin   // error_resp_done
        aw_err_pend <= 1'b0;
        w_err_done  <= 1'b0;
      end
      wr_out <= wr_out + OUT_W'(s_aw_hs && aw_legal) - OUT_W'(s_b_hs && !err_b_active);
    end
  end

  // ---------------- ar address check ----------------
  axi_addr_t        ar_q;
  logic             ar_err_pend;
  logic [ID_W-1:0]  r_err_id;
  logic [7:0]       r_err_len, r_beat;
  logic [OUT_W-1:0] rd_out;           // legal reads not yet finished
  logic             s_ar_hs, ar_legal, err_r_active, s_r_hs;

  assign ar_legal        = in_window(s_req.ar);
  assign s_resp.ar_ready = !ar_q.valid && !ar_err_pend;
  assign s_ar_hs         = s_req.ar.valid && s_resp.ar_ready;
  assign m_req.ar        = ar_q;

  // ---------------- r channel ----------------
  assign err_r_active = ar_err_pend && (rd_out == '0);
  always_comb begin
    if (err_r_active) begin
      s_resp.r      = '{id: r_err_id, data: '0, resp: RESP_DECERR,
                        last: (r_beat == r_err_len), valid: 1'b1};
      m_req.r_ready = 1'b0;
    end else begin
      s_resp.r      = m_resp.r;
      m_req.r_ready = s_req.r_ready;
    end
  end
  assign s_r_hs = s_resp.r.valid && s_req.r_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      ar_q        <= '0;
      ar_err_pend <= 1'b0;
      r_err_id    <= '0;
      r_err_len   <= '0;
      r_beat      <= '0;
      rd_out      <= '0;
    end else begin
      if (ar_q.valid && m_resp.ar_ready) ar_q.valid <= 1'b0;
      if (s_ar_hs) begin
        if (ar_legal) ar_q <= remap(s_req.ar);
        else begin
          ar_err_pend <= 1'b1;
          r_err_id    <= s_req.ar.id;
          r_err_len   <= s_req.ar.len;
          r_beat      <= '0;
        end
      end
      if (s_r_hs && err_r_active) begin
        r_beat <= r_beat + 1'b1;
        if (s_resp.r.last) ar_err_pend <= 1'b0;   // error_resp_done
      end
      rd_out <= rd_out + OUT_W'(s_ar_hs && ar_legal)
                       - OUT_W'(s_r_hs && !err_r_active && s_resp.r.last);
    end
  end

  assign decode_error = (s_aw_hs && !aw_legal) || (s_ar_hs && !ar_legal);

  // Everything sent towards the DRAM lies inside [OFFSET, OFFSET + SIZE).
  a_ar_in_window: assert property (@(posedge clk) disable iff (rst)
    m_req.ar.valid |-> ((ADDR_W+1)'(m_req.ar.addr - OFFSET) < SIZE));
  a_aw_in_window: assert property (@(posedge clk) disable iff (rst)
    m_req.aw.valid |-> ((ADDR_W+1)'(m_req.aw.addr - OFFSET) < SIZE));
  // No write data of a rejected transfer reaches the DRAM side.
  a_w_only_legal: assert property (@(posedge clk) disable iff (rst)
    m_req.w.valid |-> (!tok_empty && tok_head));

endmodule
