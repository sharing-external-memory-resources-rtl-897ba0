// dram_ctrl_model: behavioural model of an AXI4 DRAM controller plus DRAM,
// for simulation only (not synthesizable design content).
//
// One transfer at a time. After an ar handshake the first read beat comes
// a random MIN_LAT..MAX_LAT cycles later, the rest one per cycle while the
// manager is ready; after the last write beat the write response comes a
// random MIN_LAT..MAX_LAT cycles later. Memory is sparse, one 128-bit word per
// 16-byte address; a word never written reads as init_word(address).
// With READY_STALL set, ar_ready/aw_ready/w_ready are randomly withheld.
// Counters: n_reads/n_writes (address handshakes) and the address and cycle
// of the most recent ar handshake.
module dram_ctrl_model #(
  parameter int unsigned MIN_LAT     = 20,
  parameter int unsigned MAX_LAT     = 57,
  parameter bit          READY_STALL = 1'b0
) (
  input  logic               clk,
  input  logic               rst,
  input  mdp_pkg::axi_req_t  req,
  output mdp_pkg::axi_resp_t resp,
  output int                 n_reads,
  output int                 n_writes
);
  import mdp_pkg::*;

  typedef enum logic [2:0] {M_IDLE, M_RD_WAIT, M_RD_DATA, M_WR_DATA, M_WR_WAIT, M_WR_RESP} mstate_t;

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:4]];
  mstate_t           st;
  int                wait_cnt;
  logic [ADDR_W-1:0] addr;
  logic [7:0]        len, beat;
  logic [ID_W-1:0]   id;
  logic              stall;

  function automatic logic [DATA_W-1:0] init_word(logic [ADDR_W-1:4] a);
    return {4{32'(a) ^ 32'h5A5A_0000}};
  endfunction

  function automatic logic [DATA_W-1:0] rd_word(logic [ADDR_W-1:4] a);
    if (mem.exists(a)) return mem[a];
    return init_word(a);
  endfunction

  function automatic int rand_lat();
    return MIN_LAT + int'($urandom_range(MAX_LAT - MIN_LAT));
  endfunction

  always_comb begin
    resp          = '0;
    resp.ar_ready = (st == M_IDLE) && !stall;
    resp.aw_ready = (st == M_IDLE) && !stall && !req.ar.valid;
    resp.w_ready  = (st == M_WR_DATA) && !stall;
    resp.r.valid  = (st == M_RD_DATA);
    resp.r.id     = id;
    resp.r.data   = rd_word(addr[ADDR_W-1:4] + (ADDR_W-4)'(beat));
    resp.r.resp   = RESP_OKAY;
    resp.r.last   = (beat == len);
    resp.b.valid  = (st == M_WR_RESP);
    resp.b.id     = id;
    resp.b.resp   = RESP_OKAY;
  end

  always @(posedge clk) begin
    if (rst) begin
      st       <= M_IDLE;
      stall    <= 1'b0;
      n_reads  <= 0;
      n_writes <= 0;
      beat     <= '0;
      len      <= '0;
      id       <= '0;
      addr     <= '0;
      wait_cnt <= 0;
    end else begin
      stall <= READY_STALL ? ($urandom_range(3) == 0) : 1'b0;
      case (st)
        M_IDLE: begin
          if (req.ar.valid && resp.ar_ready) begin
            addr <= req.ar.addr; len <= req.ar.len; id <= req.ar.id; beat <= '0;
            wait_cnt <= rand_lat() - 1;
            n_reads  <= n_reads + 1;
            st <= M_RD_WAIT;
          end else if (req.aw.valid && resp.aw_ready) begin
            addr <= req.aw.addr; len <= req.aw.len; id <= req.aw.id; beat <= '0;
            n_writes <= n_writes + 1;
            st <= M_WR_DATA;
          end
        end
        M_RD_WAIT: begin
          if (wait_cnt <= 1) st <= M_RD_DATA;
          else wait_cnt <= wait_cnt - 1;
        end
        M_RD_DATA: if (req.r_ready) begin
          if (beat == len) st <= M_IDLE;
          else beat <= beat + 1'b1;
        end
        M_WR_DATA: if (req.w.valid && resp.w_ready) begin
          mem[addr[ADDR_W-1:4] + (ADDR_W-4)'(beat)] = req.w.data;
          beat <= beat + 1'b1;
          if (req.w.last) begin
            wait_cnt <= rand_lat() - 1;
            st <= M_WR_WAIT;
          end
        end
        M_WR_WAIT: begin
          if (wait_cnt <= 1) st <= M_WR_RESP;
          else wait_cnt <= wait_cnt - 1;
        end
        M_WR_RESP: if (req.b_ready) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
