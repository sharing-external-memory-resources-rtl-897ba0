// mdp_pkg: shared types and constants of the memory domain protector.
//
// The AXI4 bus is bundled the same way everywhere: one struct `axi_req_t`
// with every signal driven by the manager (aw, w, ar channels and the b/r
// ready bits) and one struct `axi_resp_t` with every signal driven by the
// subordinate (the aw/w/ar ready bits and the b and r channels). The data
// bus is 128 bits wide, as on the measured DRAM controller interface; the
// address is 32 bits and the ID 4 bits (ID width is this design's choice).
//
// The DRAM address layout is the one of a 2 Gbit x16 DDR3 part behind the
// controller: byte address bits [10:0] select the column, [24:11] the row
// and [27:25] the bank; bits [31:28] are unused.
//
// The enum `port_state_t` is the state of a fixed-time-arbiter channel
// controller; the AXI mux uses it to decide which channel of a port it
// connects to the DRAM bus.
package mdp_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 128;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 4;

  // Bytes per data beat as AXI size encoding (16 bytes -> 3'd4).
  localparam logic [2:0] BEAT_SIZE = 3'd4;

  typedef logic [1:0] axi_resp_code_t;
  localparam axi_resp_code_t RESP_OKAY   = 2'b00;
  localparam axi_resp_code_t RESP_SLVERR = 2'b10;
  localparam axi_resp_code_t RESP_DECERR = 2'b11;

  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] BURST_INCR  = 2'b01;
  localparam logic [1:0] BURST_WRAP  = 2'b10;

  // DRAM geometry (column / row / bank fields of the byte address).
  localparam int unsigned COL_W    = 11;
  localparam int unsigned ROW_W    = 14;
  localparam int unsigned BANK_W   = 3;
  localparam int unsigned ROW_LSB  = COL_W;
  localparam int unsigned BANK_LSB = COL_W + ROW_W;
  localparam int unsigned N_BANKS  = 1 << BANK_W;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [7:0]        len;
    logic [2:0]        size;
    logic [1:0]        burst;
    logic              valid;
  } axi_addr_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
    logic              valid;
  } axi_w_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    axi_resp_code_t  resp;
    logic            valid;
  } axi_b_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    axi_resp_code_t    resp;
    logic              last;
    logic              valid;
  } axi_r_t;

  typedef struct packed {
    axi_addr_t aw;
    axi_w_t    w;
    logic      b_ready;
    axi_addr_t ar;
    logic      r_ready;
  } axi_req_t;

  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    axi_b_t  b;
    logic    ar_ready;
    axi_r_t  r;
  } axi_resp_t;

  localparam axi_req_t  AXI_REQ_IDLE  = '0;
  localparam axi_resp_t AXI_RESP_IDLE = '0;

  // Channel controller states (fixed time arbiter).
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,
    ST_WR_ACCEPT = 3'd1,
    ST_WR_DATA   = 3'd2,
    ST_WR_RESP   = 3'd3,
    ST_RD_ACCEPT = 3'd4,
    ST_RD_RESP   = 3'd5,
    ST_RELEASE   = 3'd6
  } port_state_t;

endpackage
