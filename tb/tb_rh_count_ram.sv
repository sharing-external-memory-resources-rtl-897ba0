// tb_rh_count_ram: checks the counter RAM (small, ADDR_W = 6): all words
// start at zero; a word written on port b is read back on port a one clock
// after the read request; a read and a write of the same word on the same
// edge return the old word (read-first); a_dout holds while a_en is low.
module tb_rh_count_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        a_en = 0, b_en = 0;
  logic [5:0]  a_addr = 0, b_addr = 0;
  logic [15:0] a_dout, b_din = 0;
  logic [15:0] model [64];

  rh_count_ram #(.ADDR_W(6), .DATA_W(16)) dut (.clk, .a_en, .a_addr, .a_dout, .b_en, .b_addr, .b_din);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input int a, input logic [15:0] want, input string what);
    @(posedge clk); a_en <= 1; a_addr <= 6'(a);
    @(posedge clk); a_en <= 0;
    #1 check(a_dout == want, $sformatf("%s: addr %0d got %h want %h", what, a, a_dout, want));
  endtask

  initial begin
    for (int i = 0; i < 64; i++) model[i] = '0;
    for (int i = 0; i < 64; i += 7) rd(i, 16'h0, "initial zero");
    for (int i = 0; i < 200; i++) begin
      int a;
      logic [15:0] d;
      a = $urandom_range(63);
      d = 16'($urandom());
      @(posedge clk); b_en <= 1; b_addr <= 6'(a); b_din <= d;
      @(posedge clk); b_en <= 0;
      model[a] = d;
    end
    // read back everything
    for (int i = 0; i < 64; i++) rd(i, model[i], "read back");
    // read-first: same address on both ports on the same edge
    @(posedge clk); a_en <= 1; a_addr <= 6'd5; b_en <= 1; b_addr <= 6'd5; b_din <= model[5] + 16'd1;
    @(posedge clk); a_en <= 0; b_en <= 0;
    #1 check(a_dout == model[5], "read-first returns the old word");
    model[5] = model[5] + 16'd1;
    repeat (3) @(posedge clk);
    #1 check(a_dout == model[5] - 16'd1, "output held while a_en low");
    rd(5, model[5], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
