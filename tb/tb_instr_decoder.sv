// tb_instr_decoder: builds random instructions of each class with
// arm_asm_pkg, passes them through index_decoder and instr_decoder and checks
// the decoded fields against the values used to build them: register
// numbers (with Rd and Rn swapped for multiplies), the immediate and its
// rotate amount (twice the 4-bit field, rotate right), the shift type and
// amount of register operands (immediate-specified unless bit 4 is set), the
// 12-bit transfer offset, the sign-extended branch offset (shifted left by
// two), the register list, and the "destination is R15" flag.
module tb_instr_decoder;
  import arm7_pkg::*;
  import arm_asm_pkg::*;
  logic [31:0] instr;
  index_t      index;
  logic        swi_s, und_s;
  id_t         id;
  int          checks = 0, failures = 0;

  index_decoder u_ix (.instr(instr), .index(index), .swi(swi_s), .und(und_s));
  instr_decoder dut (.instr(instr), .index(index), .swi(swi_s), .und(und_s), .pabt(1'b0), .id(id));

  task automatic expect_true(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin
      failures++;
      $display("FAIL %s: instr %h", what, instr);
    end
  endtask

  initial begin
    instr = '0;
    for (int k = 0; k < 500; k++) begin
      logic [3:0] rd, rn, rm, rs, rot, op;
      logic [7:0] imm8;
      logic [4:0] amt;
      logic [1:0] sh;
      logic [11:0] off;
      logic [15:0] list;
      logic [31:0] from, to;
      rd = 4'($urandom); rn = 4'($urandom); rm = 4'($urandom); rs = 4'($urandom);
      rot = 4'($urandom); imm8 = 8'($urandom); amt = 5'($urandom); sh = 2'($urandom);
      off = 12'($urandom); list = 16'($urandom); op = 4'($urandom);
      if (op inside {[4'h8:4'hB]}) op = 4'hD;
      instr = dpi(AL, op, 1'($urandom), rd, rn, imm8, rot); #1;
      expect_true("dp immediate", id.index[IX_DPIS] && id.rd === rd && id.rn === rn && id.imm === 32'(imm8) &&
                  id.sval === {3'd0, rot, 1'b0} && id.shtype === ROR && id.opcode === op &&
                  id.dreg_pc === (rd === 15));
      instr = dpr(AL, op, 1'($urandom), rd, rn, rm, sh, amt); #1;
      expect_true("dp register", id.index[IX_DPIS] && id.rm === rm && id.sval === 8'(amt) &&
                  id.shtype === sh && id.imm_shift);
      instr = dprs(AL, op, 1'($urandom), rd, rn, rm, sh, rs); #1;
      expect_true("dp register shift", id.index[IX_DPRS] && id.rs === rs && id.rm === rm && !id.imm_shift);
      instr = mla(AL, 1'($urandom), rd, rm, rs, rn); #1;
      expect_true("mla", id.index[IX_MULT] && id.rd === rd && id.rn === rn && id.rm === rm && id.rs === rs &&
                  id.acc);
      instr = sdt(AL, 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), rd, rn, off); #1;
      expect_true("transfer immediate", id.index[IX_SDT] && id.rd === rd && id.rn === rn &&
                  id.imm === 32'(off) && !id.i_bit);
      instr = sdtr(AL, 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), rd, rn, rm, sh, amt); #1;
      expect_true("transfer register", id.index[IX_SDT] && id.i_bit && id.rm === rm && id.sval === 8'(amt) &&
                  id.shtype === sh && id.imm_shift);
      instr = bdt(AL, 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), rn, list); #1;
      expect_true("block transfer", id.index[IX_BDT] && id.rn === rn && id.reglist === list);
      from = {$urandom} & 32'h00FF_FFFC; to = {$urandom} & 32'h00FF_FFFC;
      instr = br(AL, 1'($urandom), from, to); #1;
      expect_true("branch", id.index[IX_BBL] && ((id.imm << 2) + from + 32'd8) === to &&
                  id.sval === 8'd2 && id.shtype === LSL);
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
