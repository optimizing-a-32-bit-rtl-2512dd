// tb_index_decoder: checks the instruction-class decoder.  Known encodings of
// every class (built with arm_asm_pkg) are applied first, then random words
// in which the class-selecting bits are forced to each class pattern and the
// rest is random, then fully random words.  Each word is compared with a
// reference written as casez patterns of the ARM instruction set; the output
// must also be one-hot (exactly one of the ten index bits, SWI or undefined).
// Combinational, 1 ns steps.
module tb_index_decoder;
  import arm7_pkg::*;
  import arm_asm_pkg::*;
  logic [31:0] instr;
  index_t      index;
  logic        swi, und;
  int          checks = 0, failures = 0;

  index_decoder dut (.*);

  // expected {und, swi, index}
  function automatic logic [11:0] reference(logic [31:0] w);
    logic [9:0] ix;
    ix = '0;
    casez (w[27:0])
      28'b1111_????_????_????_????_????_????: return 12'b01_0000000000;
      28'b101?_????_????_????_????_????_????: ix[IX_BBL] = 1;
      28'b100?_????_????_????_????_????_????: ix[IX_BDT] = 1;
      28'b11??_????_????_????_????_????_????: return 12'b10_0000000000;
      28'b011?_????_????_????_????_???1_????: return 12'b10_0000000000;
      28'b01??_????_????_????_????_????_????: ix[IX_SDT] = 1;
      28'b0000_00??_????_????_????_1001_????: ix[IX_MULT] = 1;
      28'b0001_0?00_????_????_0000_1001_????: ix[IX_SWAP] = 1;
      28'b000?_????_????_????_????_1??1_????: return 12'b10_0000000000;
      28'b0001_0?00_1111_????_0000_0000_0000: ix[IX_MRS] = 1;
      28'b0001_0?10_1001_1111_0000_0000_????: ix[IX_MSR] = 1;
      28'b0001_0?10_1000_1111_0000_0000_????: ix[IX_MFRI] = 1;
      28'b0011_0?10_1000_1111_????_????_????: ix[IX_MFRI] = 1;
      28'b00?1_0??0_????_????_????_????_????: return 12'b10_0000000000;
      28'b000?_????_????_????_????_???1_????: ix[IX_DPRS] = 1;
      default: ix[IX_DPIS] = 1;
    endcase
    return {2'b00, ix};
  endfunction

  task automatic check(input logic [31:0] w);
    logic [11:0] exp;
    instr = w;
    #1;
    exp = reference(w);
    checks++;
    if ({und, swi, index} !== exp || !$onehot({und, swi, index})) begin
      failures++;
      $display("FAIL instr=%h: und=%b swi=%b index=%b exp %b", w, und, swi, index, exp);
    end
  endtask

  initial begin
    logic [31:0] pat [10], msk [10];
    instr = '0;
    check(dpi(AL, ADD, 1, 1, 2, 8'd3));
    check(dpr(NE, MOV, 0, 3, 0, 4, ASR, 5'd7));
    check(dprs(AL, ORR, 0, 3, 5, 4, ROR, 6));
    check(mul(AL, 1, 2, 3, 4));
    check(mla(GT, 0, 2, 3, 4, 5));
    check(swp(AL, 1, 2, 3, 4));
    check(sdt(AL, 1, 1, 0, 1, 0, 2, 0, 12'd1));
    check(sdtr(AL, 0, 0, 1, 0, 1, 2, 0, 1, LSL, 5'd2));
    check(bdt(AL, 1, 0, 1, 0, 1, 13, 16'h80F0));
    check(br(AL, 1, 32'h100, 32'h40));
    check(mrs(AL, 1, 4));
    check(msr(AL, 0, 4));
    check(msrf_imm(AL, 0, 8'hF0, 4'd4));
    check(arm_asm_pkg::swi(AL, 24'h123456));
    check(32'hE7F0_00F0);
    check(32'hEE01_0F10);                                 // coprocessor
    check(32'hE12F_FF1E);                                 // BX: not in ARMv3
    // class patterns with random fill: bits set in msk are forced to pat
    pat[0] = 32'h0000_0090; msk[0] = 32'h0FC0_00F0;      // multiply
    pat[1] = 32'h0100_0090; msk[1] = 32'h0FB0_0FF0;      // swap
    pat[2] = 32'h010F_0000; msk[2] = 32'h0FBF_0FFF;      // MRS
    pat[3] = 32'h0129_F000; msk[3] = 32'h0FBF_FFF0;      // MSR
    pat[4] = 32'h0128_F000; msk[4] = 32'h0FBF_FFF0;      // MSR flags, register
    pat[5] = 32'h0328_F000; msk[5] = 32'h0FBF_F000;      // MSR flags, immediate
    pat[6] = 32'h0000_0010; msk[6] = 32'h0E00_0090;      // register-specified shift
    pat[7] = 32'h0400_0000; msk[7] = 32'h0C00_0000;      // single transfer
    pat[8] = 32'h0800_0000; msk[8] = 32'h0E00_0000;      // block transfer
    pat[9] = 32'h0000_0000; msk[9] = 32'h0C00_0000;      // data processing
    for (int k = 0; k < 300; k++)
      foreach (pat[i]) check((32'($urandom) & ~msk[i]) | pat[i]);
    for (int k = 0; k < 5000; k++) check($urandom);
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
