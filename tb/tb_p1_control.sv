// tb_p1_control: checks the phase-1 control unit (the Table 4 signals:
// register writes, PSR updates, PC and address register, memory request).
// For each case an instruction is decoded through index_decoder and
// instr_decoder, a cycle kind and context are applied, and the signals that
// define that cycle are compared with their intended values: for example a
// data-processing cycle writes Rd and fetches, a compare only sets flags, a
// write to R15 flushes and loads the address from the ALU, a store cycle
// drives nRW high and a byte store nBW low, exception entry saves the CPSR
// into the SPSR and changes mode, and a forced-user block transfer selects
// the user bank.  Combinational, 1 ns steps.
module tb_p1_control;
  import arm7_pkg::*;
  import arm_asm_pkg::*;
  cyc_t        kind;
  ctx_t        ctx;
  id_t         id;
  p1_t         p1;
  logic [31:0] instr;
  index_t      index;
  logic        swi_s, und_s;
  int          checks = 0, failures = 0;

  index_decoder u_ix (.instr(instr), .index(index), .swi(swi_s), .und(und_s));
  instr_decoder u_id (.instr(instr), .index(index), .swi(swi_s), .und(und_s), .pabt(1'b0), .id(id));
  p1_control dut (.*);

  task automatic apply(input cyc_t k, input logic [31:0] w);
    kind = k; instr = w;
    ctx = '0; ctx.cond_ok = 1'b1;
    ctx.pc_in_list = w[15];
    ctx.exc_code = EXC_NONE;
    #1;
  endtask

  task automatic expect_true(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin
      failures++;
      $display("FAIL %s (kind %s, instr %h)", what, kind.name(), instr);
    end
  endtask

  initial begin
    kind = CY_NOP; ctx = '0; instr = '0;
    for (int r = 0; r < 20; r++) begin
      logic [3:0] rd, rn;
      rd = 4'($urandom % 15); rn = 4'($urandom % 15);
      apply(CY_DP, dpi(AL, ADD, 0, rd, rn, 8'($urandom)));
      expect_true("add writes rd and fetches", p1.we_reg && p1.dest_sel === D_RD && p1.if_load &&
                  !p1.nmreq && p1.we_pc && !p1.cpsr_set && !p1.nrw);
      apply(CY_DP, dpi(AL, ADD, 1, rd, rn, 8'($urandom)));
      expect_true("adds sets nzc and v", p1.cpsr_set && p1.vbit_in);
      apply(CY_DP, dpr(AL, AND, 1, rd, rn, 4'(r)));
      expect_true("ands sets nzc, keeps v", p1.cpsr_set && !p1.vbit_in && p1.we_reg);
      apply(CY_DP, dpr(AL, CMP, 1, 0, rn, 4'(r)));
      expect_true("cmp only sets flags", !p1.we_reg && p1.cpsr_set);
      apply(CY_NOP, dpi(NE, ADD, 1, rd, rn, 8'd1));
      expect_true("failed condition writes nothing", !p1.we_reg && !p1.cpsr_set && p1.if_load);
      apply(CY_SDT2, sdt(AL, 0, 0, 1, 1, 0, rd, rn, 12'($urandom)));
      expect_true("str writes memory", !p1.nmreq && p1.nrw && p1.nbw && !p1.if_load);
      apply(CY_SDT2, sdt(AL, 0, 1, 1, 1, 0, rd, rn, 12'($urandom)));
      expect_true("strb is a byte access", !p1.nmreq && p1.nrw && !p1.nbw);
      apply(CY_SDT2, sdt(AL, 1, 0, 1, 1, 0, rd, rn, 12'($urandom)));
      expect_true("ldr reads and latches data", !p1.nmreq && !p1.nrw && p1.datain_reg_in);
    end
    apply(CY_DP, dpr(AL, MOV, 0, 15, 0, 14));
    expect_true("mov pc flushes and jumps", p1.if_flush && p1.address_reg_in && p1.addr_sel === AD_ALU &&
                !p1.we_reg && !p1.if_load);
    apply(CY_DP, dpr(AL, MOV, 1, 15, 0, 14));
    expect_true("movs pc restores cpsr", p1.storedata_tocpsr && p1.inputmux_tocpsr);
    apply(CY_BR1, br(AL, 1, 32'h0, 32'h400));
    expect_true("branch target to address", p1.if_flush && p1.addr_sel === AD_ALU && p1.nmreq);
    apply(CY_REFILL1, br(AL, 1, 32'h0, 32'h400));
    expect_true("bl writes lr", p1.we_reg && p1.dest_sel === D_LR);
    apply(CY_REFILL1, br(AL, 0, 32'h0, 32'h400));
    expect_true("b does not write lr", !p1.we_reg);
    apply(CY_MRS, mrs(AL, 1, 3));
    expect_true("mrs spsr", p1.output_select && p1.we_reg);
    apply(CY_MSR, msr(AL, 1, 3));
    expect_true("msr spsr", p1.storedata_tospsr && !p1.storedata_tocpsr);
    apply(CY_MSR, msr(AL, 0, 3));
    expect_true("msr cpsr", p1.storedata_tocpsr && !p1.storedata_tospsr);
    apply(CY_MFRI, msrf_imm(AL, 0, 8'hF0, 4'd4));
    expect_true("msr cpsr flags", p1.storeflag_tocpsr && !p1.storedata_tocpsr);
    apply(CY_X1, dpi(AL, ADD, 0, 1, 2, 8'd3));
    expect_true("exception entry", p1.if_flush && p1.change_mode && p1.storedata_tospsr &&
                p1.inputmux_tospsr && p1.we_reg && p1.dest_sel === D_LR);
    apply(CY_XR, sdt(AL, 1, 0, 1, 1, 1, 2, 1, 12'd4));
    expect_true("abort restores base", p1.we_reg && p1.dest_sel === D_RN);
    apply(CY_BDTX, bdt(AL, 0, 0, 1, 1, 0, 0, 16'h2000));
    expect_true("stm ^ uses user bank", p1.regmode_sel === RM_USR && !p1.nmreq && p1.nrw);
    apply(CY_BDTX, bdt(AL, 0, 0, 1, 0, 0, 0, 16'h2000));
    expect_true("stm uses current bank", p1.regmode_sel === RM_PSR);
    apply(CY_LDM4, bdt(AL, 1, 0, 1, 1, 1, 13, 16'h8000));
    expect_true("ldm pc ^ restores cpsr", p1.storedata_tocpsr && p1.inputmux_tocpsr && p1.if_flush);
    apply(CY_LDM4, bdt(AL, 1, 0, 1, 0, 1, 13, 16'h0030));
    expect_true("ldm last register written", p1.we_reg && p1.dest_sel === D_BDT && p1.if_load);
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
