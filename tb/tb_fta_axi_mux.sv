// tb_fta_axi_mux: random stimulus on every input of the combinational mux
// (port requests, DRAM response, controller states, input_sel) and a
// comparison of every output with a reference written from the connection
// table: ar in RD_ACCEPT, r in RD_RESP, aw in WR_ACCEPT, w in WR_DATA, b in
// WR_DATA and WR_RESP, all else idle; only the selected port is connected.
module tb_fta_axi_mux;
  import mdp_pkg::*;
  localparam int N = 3;

  axi_req_t    req_vector  [N];
  axi_resp_t   resp_vector [N];
  axi_req_t    req;
  axi_resp_t   resp;
  port_state_t state_vector [N];
  logic [1:0]  input_sel;

  fta_axi_mux #(.N_PORTS(N)) dut (.req_vector, .resp_vector, .req, .resp, .state_vector, .input_sel);

  int checks = 0, failures = 0;

  function automatic axi_req_t rand_req();
    axi_req_t r;
    logic [$bits(axi_req_t)-1:0] bits;
    for (int i = 0; i < $bits(axi_req_t); i += 32) bits[i +: 32] = $urandom();
    r = axi_req_t'(bits);
    return r;
  endfunction

  function automatic axi_resp_t rand_resp();
    logic [$bits(axi_resp_t)-1:0] bits;
    for (int i = 0; i < $bits(axi_resp_t); i += 32) bits[i +: 32] = $urandom();
    return axi_resp_t'(bits);
  endfunction

  initial begin
    axi_req_t  exp_req;
    axi_resp_t exp_resp [N];
    port_state_t s;
    for (int it = 0; it < 5000; it++) begin
      for (int i = 0; i < N; i++) begin
        req_vector[i]   = rand_req();
        state_vector[i] = port_state_t'($urandom_range(6));
      end
      resp      = rand_resp();
      input_sel = 2'($urandom_range(N - 1));
      #1;
      s       = state_vector[input_sel];
      exp_req = '0;
      case (s)
        ST_RD_ACCEPT: exp_req.ar = req_vector[input_sel].ar;
        ST_RD_RESP:   exp_req.r_ready = req_vector[input_sel].r_ready;
        ST_WR_ACCEPT: exp_req.aw = req_vector[input_sel].aw;
        ST_WR_DATA:   begin exp_req.w = req_vector[input_sel].w; exp_req.b_ready = req_vector[input_sel].b_ready; end
        ST_WR_RESP:   exp_req.b_ready = req_vector[input_sel].b_ready;
        default: ;
      endcase
      for (int i = 0; i < N; i++) begin
        exp_resp[i] = '0;
        if (i == int'(input_sel)) begin
          case (state_vector[i])
            ST_RD_ACCEPT: exp_resp[i].ar_ready = resp.ar_ready;
            ST_RD_RESP:   exp_resp[i].r = resp.r;
            ST_WR_ACCEPT: exp_resp[i].aw_ready = resp.aw_ready;
            ST_WR_DATA:   begin exp_resp[i].w_ready = resp.w_ready; exp_resp[i].b = resp.b; end
            ST_WR_RESP:   exp_resp[i].b = resp.b;
            default: ;
          endcase
        end
      end
      checks++;
      if (req !== exp_req) begin
        failures++;
        $display("FAIL it=%0d: req mismatch, state %s sel %0d", it, s.name(), input_sel);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (resp_vector[i] !== exp_resp[i]) begin
          failures++;
          $display("FAIL it=%0d: resp_vector[%0d] mismatch", it, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
