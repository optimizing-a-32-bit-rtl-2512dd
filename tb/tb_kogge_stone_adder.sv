// tb_kogge_stone_adder: adds random and corner operands (zero, all ones,
// alternating bits, carry chains the full width long) with carry-in 0 and 1,
// and compares the sum, the carry out and the carry into the top bit with a
// 33-bit addition done here.  The adder is used at its default 32-bit width.
// Combinational, 1 ns steps.
module tb_kogge_stone_adder;
  logic [31:0] a, b, sum;
  logic        cin, cout, c_msb;
  int          checks = 0, failures = 0;

  kogge_stone_adder dut (.*);

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic ci);
    logic [32:0] full;
    logic [31:0] low;
    a = x; b = y; cin = ci;
    #1;
    full = {1'b0, x} + {1'b0, y} + 33'(ci);
    low  = {1'b0, x[30:0]} + {1'b0, y[30:0]} + 32'(ci);
    checks++;
    if (sum !== full[31:0] || cout !== full[32] || c_msb !== low[31]) begin
      failures++;
      $display("FAIL %h + %h + %b: sum=%h cout=%b cmsb=%b", x, y, ci, sum, cout, c_msb);
    end
  endtask

  initial begin
    a = '0; b = '0; cin = 0;
    for (int ci = 0; ci < 2; ci++) begin
      check(32'h0, 32'h0, ci[0]);
      check(32'hFFFF_FFFF, 32'h0, ci[0]);
      check(32'hFFFF_FFFF, 32'hFFFF_FFFF, ci[0]);
      check(32'hAAAA_AAAA, 32'h5555_5555, ci[0]);
      check(32'h7FFF_FFFF, 32'h0000_0001, ci[0]);
      check(32'h8000_0000, 32'h8000_0000, ci[0]);
      for (int i = 0; i < 32; i++) check(32'hFFFF_FFFF >> i, 32'h1 << i, ci[0]);
    end
    for (int k = 0; k < 2000; k++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
