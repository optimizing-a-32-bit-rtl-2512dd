// tb_load_byte: the address offset is captured with loadbyte_enable at one
// clock edge, as in the core's memory cycle, and the data word arriving in
// the following cycle is then checked: with the byte bit set the addressed
// byte must appear zero-extended, without it the word must be rotated right
// by 8 x offset (the ARM rule for unaligned word loads).  The test also
// checks that the offset register holds while the enable is low.  Clock
// period 10 ns; inputs change 1 ns after the rising edge.
module tb_load_byte;
  logic        clk = 0, rst_n = 1;
  logic        loadbyte_enable, bbit;
  logic [1:0]  addr_lsb;
  logic [31:0] din, dout;
  int          checks = 0, failures = 0;

  load_byte dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic [1:0] off, input logic b, input logic [31:0] d);
    logic [31:0] exp;
    exp = b ? {24'd0, d[8*off +: 8]} : ((d >> (8 * off)) | (d << (32 - 8 * off)));
    if (off === 2'd0 && !b) exp = d;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL off=%0d b=%b din=%h: got %h exp %h", off, b, d, dout, exp);
    end
  endtask

  initial begin
    logic [1:0] off;
    loadbyte_enable = 0; bbit = 0; addr_lsb = 0; din = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      off = 2'($urandom);
      @(posedge clk) #1;
      loadbyte_enable = 1; addr_lsb = off;
      @(posedge clk) #1;
      loadbyte_enable = 0; addr_lsb = 2'($urandom);    // must not disturb the held offset
      bbit = 1'($urandom); din = $urandom;
      #1 check(off, bbit, din);
      @(posedge clk) #1;
      din = $urandom;
      #1 check(off, bbit, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
