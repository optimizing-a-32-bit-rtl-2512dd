// tb_exception_mux: applies each of the eight exception codes and compares
// the vector address and the entered mode with the ARM7 exception table:
// reset 0x00 SVC, SWI 0x08 SVC, undefined 0x04 UND, data abort 0x10 ABT,
// prefetch abort 0x0C ABT, IRQ 0x18 IRQ, FIQ 0x1C FIQ.  Code 7 (no
// exception) is not used by the core and is not checked.  Combinational.
module tb_exception_mux;
  import arm7_pkg::*;
  exc_code_t   code;
  logic [31:0] vector;
  logic [4:0]  mode;
  int          checks = 0, failures = 0;

  exception_mux dut (.*);

  task automatic check(input exc_code_t cd, input logic [31:0] vec, input logic [4:0] md);
    code = cd;
    #1;
    checks++;
    if (vector !== vec || mode !== md) begin
      failures++;
      $display("FAIL code=%0d: vector=%h mode=%b", cd, vector, mode);
    end
  endtask

  initial begin
    code = EXC_RESET;
    repeat (4) begin
      check(EXC_RESET, 32'h00, 5'b10011);
      check(EXC_SWI,   32'h08, 5'b10011);
      check(EXC_UND,   32'h04, 5'b11011);
      check(EXC_DABT,  32'h10, 5'b10111);
      check(EXC_PABT,  32'h0C, 5'b10111);
      check(EXC_IRQ,   32'h18, 5'b10010);
      check(EXC_FIQ,   32'h1C, 5'b10001);
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
