// rh_count_ram: two-port block RAM holding the row access counters.
//
// Port a reads: the word at a_addr appears on a_dout one clock after a_en.
// Port b writes b_din to b_addr when b_en is high. When both ports use the
// same address on the same edge, port a returns the old word (read-first),
// as the block RAM the row refresher was designed around does.
// Every counter starts at zero (initial contents, as FPGA block RAM is
// loaded at configuration); no reset clears the array.
// 2**ADDR_W words of DATA_W bits: 2**14 x 16 bits (32 KiB) for row-only
// tracking, 2**17 x 16 bits (256 KiB) when banks are tracked too.
module rh_count_ram #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic [ADDR_W-1:0] a_addr,
  output logic [DATA_W-1:0] a_dout,
  input  logic              b_en,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_din
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) a_dout <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) mem[b_addr] <= b_din;
  end

endmodule
