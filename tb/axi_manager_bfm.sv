// axi_manager_bfm: AXI4 manager for testbenches (a core or traffic
// generator). Tasks issue one transfer at a time and report its outcome:
//   read (addr, len, id)  -> rdata[0..len], resp of each beat, and the cycle
//                            numbers of the ar handshake and of the last beat
//   write(addr, len, id)  -> writes wdata_of(addr, beat), returns the b resp
//                            and the cycles of the aw handshake and of b.
// Signals are driven with non-blocking assignments right after a rising
// edge and sampled on the edge. With THROTTLE set, r_ready/b_ready and
// w.valid are randomly withheld. cyc counts clock edges since time 0.
module axi_manager_bfm #(
  parameter bit THROTTLE = 1'b0
) (
  input  logic               clk,
  output mdp_pkg::axi_req_t  req,
  input  mdp_pkg::axi_resp_t resp
);
  import mdp_pkg::*;

  int                  cyc = 0;
  logic [DATA_W-1:0]   rdata [256];
  axi_resp_code_t      rresp [256];
  int                  t_addr, t_end;      // handshake cycles of the last transfer
  axi_resp_code_t      last_resp;

  initial req = '0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [DATA_W-1:0] wdata_of(logic [ADDR_W-1:0] a, int beat);
    return {4{32'(a) + 32'(beat) * 32'h0101_0101 + 32'hC0DE_0000}};
  endfunction

  function automatic logic coin();
    return THROTTLE ? ($urandom_range(3) != 0) : 1'b1;
  endfunction

  task automatic read(input logic [ADDR_W-1:0] addr, input logic [7:0] len,
                      input logic [ID_W-1:0] id);
    int beat = 0;
    req.ar <= '{id: id, addr: addr, len: len, size: BEAT_SIZE, burst: BURST_INCR, valid: 1'b1};
    do @(posedge clk); while (!resp.ar_ready);
    t_addr = cyc;
    req.ar.valid <= 1'b0;
    req.r_ready  <= coin();
    forever begin
      @(posedge clk);
      if (resp.r.valid && req.r_ready) begin
        rdata[beat] = resp.r.data;
        rresp[beat] = resp.r.resp;
        beat++;
        if (resp.r.last) begin
          t_end     = cyc;
          last_resp = resp.r.resp;
          req.r_ready <= 1'b0;
          break;
        end
      end
      req.r_ready <= coin();
    end
  endtask

  task automatic write(input logic [ADDR_W-1:0] addr, input logic [7:0] len,
                       input logic [ID_W-1:0] id);
    int beat = 0;
    logic v;
    req.aw <= '{id: id, addr: addr, len: len, size: BEAT_SIZE, burst: BURST_INCR, valid: 1'b1};
    do @(posedge clk); while (!resp.aw_ready);
    t_addr = cyc;
    req.aw.valid <= 1'b0;
    v = coin();
    req.w <= '{data: wdata_of(addr, 0), strb: '1, last: (len == 0), valid: v};
    forever begin
      @(posedge clk);
      if (req.w.valid && resp.w_ready) begin
        beat++;
        if (beat > int'(len)) break;
        v = coin();
        req.w <= '{data: wdata_of(addr, beat), strb: '1, last: (beat == int'(len)), valid: v};
      end else if (!req.w.valid) begin
        req.w.valid <= coin();   // once valid, a beat is held until taken
      end
    end
    req.w.valid <= 1'b0;
    req.b_ready <= coin();
    forever begin
      @(posedge clk);
      if (resp.b.valid && req.b_ready) begin
        t_end     = cyc;
        last_resp = resp.b.resp;
        req.b_ready <= 1'b0;
        break;
      end
      req.b_ready <= coin();
    end
  endtask

endmodule
