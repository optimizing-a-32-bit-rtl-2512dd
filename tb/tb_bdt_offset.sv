// tb_bdt_offset: checks the block-transfer offset unit.  Random and corner
// register lists (empty, single register, all sixteen) are applied with all
// four pre/post and up/down combinations; the register count, count minus
// one and the start-address offset (in words) are compared with a count made
// here bit by bit.  Offsets expected: decrement-after count-1, increment-after
// 0, decrement-before count, increment-before 1.  Combinational, 1 ns steps.
module tb_bdt_offset;
  logic [15:0] register_list;
  logic        prepost_bit, updown_bit;
  logic [4:0]  count, count_minus1, address_offset;
  int          checks = 0, failures = 0;

  bdt_offset dut (.*);

  task automatic check(input logic [15:0] list, input logic p, input logic u);
    int unsigned ones;
    logic [4:0] exp_off;
    register_list = list; prepost_bit = p; updown_bit = u;
    #1;
    ones = 0;
    for (int i = 0; i < 16; i++) if (list[i]) ones++;
    case ({p, u})
      2'b00: exp_off = 5'(ones - 1);
      2'b01: exp_off = 5'd0;
      2'b10: exp_off = 5'(ones);
      default: exp_off = 5'd1;
    endcase
    checks++;
    if (count !== 5'(ones) || count_minus1 !== 5'(ones - 1) || address_offset !== exp_off) begin
      failures++;
      $display("FAIL list=%h p=%b u=%b: count=%0d m1=%0d off=%0d", list, p, u,
               count, count_minus1, address_offset);
    end
  endtask

  initial begin
    register_list = '0; prepost_bit = 0; updown_bit = 0;
    for (int pu = 0; pu < 4; pu++) begin
      check(16'h0000, pu[1], pu[0]);
      check(16'hFFFF, pu[1], pu[0]);
      for (int i = 0; i < 16; i++) check(16'h0001 << i, pu[1], pu[0]);
      for (int k = 0; k < 300; k++) check(16'($urandom), pu[1], pu[0]);
    end
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
