// tb_alu: checks all sixteen ARM data-processing operations of the ALU.  For
// random and corner operands the result and the N, Z, C, V flags are compared
// with a model written here: arithmetic is done on 33-bit values and the
// overflow flag is derived from operand and result signs.  Logical operations
// must give C from the shifter carry input and leave V as it was.  The
// compare/test operations are checked on the result they compute (the core
// simply does not write it back).  Combinational, 1 ns steps.
module tb_alu;
  logic [31:0] a, b, result;
  logic [3:0]  opcode;
  logic        cin, shift_c, vin, n, z, c, v, arith;
  int          checks = 0, failures = 0;

  alu dut (.*);

  task automatic check(input logic [3:0] op, input logic [31:0] x, input logic [31:0] y,
                       input logic ci, input logic sc, input logic vi);
    logic [32:0] w;
    logic [31:0] r, p, q;
    logic ec, ev, ar;
    opcode = op; a = x; b = y; cin = ci; shift_c = sc; vin = vi;
    #1;
    ar = 1'b1; p = x; q = y; w = '0;
    case (op)
      4'h0, 4'h8: begin r = x & y; ar = 0; end
      4'h1, 4'h9: begin r = x ^ y; ar = 0; end
      4'hC:       begin r = x | y; ar = 0; end
      4'hD:       begin r = y;     ar = 0; end
      4'hE:       begin r = x & ~y; ar = 0; end
      4'hF:       begin r = ~y;    ar = 0; end
      4'h2, 4'hA: begin w = {1'b0, x} + {1'b0, ~y} + 33'd1; q = ~y; end
      4'h3:       begin w = {1'b0, y} + {1'b0, ~x} + 33'd1; p = y; q = ~x; end
      4'h4, 4'hB: begin w = {1'b0, x} + {1'b0, y}; end
      4'h5:       begin w = {1'b0, x} + {1'b0, y} + 33'(ci); end
      4'h6:       begin w = {1'b0, x} + {1'b0, ~y} + 33'(ci); q = ~y; end
      default:    begin w = {1'b0, y} + {1'b0, ~x} + 33'(ci); p = y; q = ~x; end
    endcase
    if (ar) r = w[31:0];
    ec = ar ? w[32] : sc;
    ev = ar ? ((p[31] === q[31]) && (r[31] !== p[31])) : vi;
    checks++;
    if (result !== r || n !== r[31] || z !== (r === 0) || c !== ec || v !== ev || arith !== ar) begin
      failures++;
      $display("FAIL op=%h a=%h b=%h cin=%b: got %h nzcv=%b%b%b%b exp %h c=%b v=%b",
               op, x, y, ci, result, n, z, c, v, r, ec, ev);
    end
  endtask

  initial begin
    logic [31:0] corner [6];
    corner = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h8000_0001};
    a = '0; b = '0; opcode = '0; cin = 0; shift_c = 0; vin = 0;
    for (int op = 0; op < 16; op++) begin
      foreach (corner[i]) foreach (corner[j])
        for (int f = 0; f < 8; f++) check(4'(op), corner[i], corner[j], f[0], f[1], f[2]);
      for (int k = 0; k < 500; k++)
        check(4'(op), $urandom, $urandom, 1'($urandom), 1'($urandom), 1'($urandom));
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
