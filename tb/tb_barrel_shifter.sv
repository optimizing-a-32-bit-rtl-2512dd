// tb_barrel_shifter: compares the barrel shifter with a reference model of the
// ARM shifter operand written here with plain SystemVerilog shift operators.
// Covered: LSL, LSR, ASR and ROR by register amounts 0..255 (so 0, 1-31, 32
// and above 32) and by immediate amounts 0..31, where LSR/ASR #0 mean a shift
// by 32 and ROR #0 means RRX through the carry.  Both the result and the
// carry out are checked, for random data and carry-in.  Immediate amounts
// are kept below 32, since the decoder feeds a 5-bit field.  Combinational.
module tb_barrel_shifter;
  logic [31:0] din, dout;
  logic [7:0]  sval;
  logic [1:0]  shtype;
  logic        imm_shift, cin, cout;
  int          checks = 0, failures = 0;

  barrel_shifter dut (.*);

  task automatic reference(input logic [31:0] d, input logic [7:0] amt, input logic [1:0] t,
                           input logic imm, input logic ci, output logic [31:0] r, output logic co);
    int unsigned n;
    logic [63:0] dd;
    n = amt;
    if (imm) begin
      n = amt[4:0];
      if (n === 0 && t === 2'd3) begin        // RRX
        r = {ci, d[31:1]}; co = d[0];
        return;
      end
      if (n === 0 && (t === 2'd1 || t === 2'd2)) n = 32;
    end
    if (n === 0) begin
      r = d; co = ci;
      return;
    end
    case (t)
      2'd0: begin
        r  = (n >= 32) ? 32'h0 : d << n;
        co = (n > 32) ? 1'b0 : d[32 - n];
      end
      2'd1: begin
        r  = (n >= 32) ? 32'h0 : d >> n;
        co = (n > 32) ? 1'b0 : d[n - 1];
      end
      2'd2: begin
        r  = (n >= 32) ? {32{d[31]}} : 32'($signed(d) >>> n);
        co = (n >= 32) ? d[31] : d[n - 1];
      end
      default: begin
        dd = {d, d} >> (n % 32);
        r  = dd[31:0];
        co = r[31];
      end
    endcase
  endtask

  task automatic check(input logic [31:0] d, input logic [7:0] amt, input logic [1:0] t,
                       input logic imm, input logic ci);
    logic [31:0] r;
    logic co;
    din = d; sval = amt; shtype = t; imm_shift = imm; cin = ci;
    #1;
    reference(d, amt, t, imm, ci, r, co);
    checks++;
    if (dout !== r || cout !== co) begin
      failures++;
      $display("FAIL d=%h amt=%0d type=%0d imm=%b cin=%b: got %h/%b exp %h/%b",
               d, amt, t, imm, ci, dout, cout, r, co);
    end
  endtask

  initial begin
    din = '0; sval = '0; shtype = '0; imm_shift = 0; cin = 0;
    for (int t = 0; t < 4; t++) begin
      for (int amt = 0; amt < 256; amt++) check($urandom, 8'(amt), 2'(t), 1'b0, 1'($urandom));
      for (int amt = 0; amt < 32; amt++) begin
        check($urandom, 8'(amt), 2'(t), 1'b1, 1'b0);
        check($urandom, 8'(amt), 2'(t), 1'b1, 1'b1);
        check(32'h8000_0001, 8'(amt), 2'(t), 1'b1, 1'($urandom));
      end
      for (int k = 0; k < 1000; k++) check($urandom, 8'($urandom), 2'(t), 1'b0, 1'($urandom));
      for (int k = 0; k < 1000; k++) check($urandom, 8'($urandom % 32), 2'(t), 1'b1, 1'($urandom));
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
